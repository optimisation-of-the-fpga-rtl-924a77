// coef_ctrl -- mode state machine: coefficient reading or calculation.
//
// After reset the network is idle. A pulse on `start` enters LOAD: the machine
// reads the coefficient RAM at addresses 0 .. NCOEF-1, one per cycle, and
// since the RAM read takes one cycle it raises `coef_shift` one cycle after
// each read so that every word is pushed into the network's coefficient shift
// chain as it arrives. Word 0 therefore ends in the deepest register of the
// chain. When the last word has been pushed the machine enters RUN and holds
// `calc_en` high; `start` in RUN reloads. `loading` is high in LOAD.
// `settled` rises WARMUP cycles after RUN was entered, once every pipeline
// stage holds results computed with the new coefficients.
// The two modes follow the reference design; the encoding, the restart rule
// and the warm-up count are this design's choices.
module coef_ctrl #(
  parameter int NCOEF  = 88,
  parameter int ADDR_W = 7,
  parameter int WARMUP = 70
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              coef_shift,
  output logic              loading,
  output logic              calc_en,
  output logic              settled
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_e;

  localparam int CW = $clog2(WARMUP + 1);

  state_e            state;
  logic [ADDR_W:0]   cnt;
  logic [CW-1:0]     warm;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cnt        <= '0;
      coef_shift <= 1'b0;
      warm       <= '0;
    end else begin
      coef_shift <= rd_en;
      case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          cnt   <= '0;
        end
        S_LOAD: begin
          if (cnt < (ADDR_W+1)'(NCOEF)) cnt <= cnt + 1'b1;
          // last read issued in the previous cycle and its word shifted now
          if (cnt == (ADDR_W+1)'(NCOEF)) begin
            state <= S_RUN;
            warm  <= '0;
          end
        end
        S_RUN: begin
          if (warm < CW'(WARMUP)) warm <= warm + 1'b1;
          if (start) begin
            state <= S_LOAD;
            cnt   <= '0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign rd_en   = (state == S_LOAD) && (cnt < (ADDR_W+1)'(NCOEF));
  assign rd_addr = cnt[ADDR_W-1:0];
  assign loading = (state == S_LOAD);
  assign calc_en = (state == S_RUN);
  assign settled = (state == S_RUN) && (warm == CW'(WARMUP));

endmodule
