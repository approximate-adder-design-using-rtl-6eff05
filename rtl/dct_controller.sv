// dct_controller: sequencer of the serial 1-D DCT.
//
// One transform runs through four phases:
//   IDLE    wait for start; in the start cycle load the input register.
//   COMPUTE 64 cycles, one multiply-accumulate each, k outer, n inner:
//           SEL 1 = n and LATCH 1 captures X(n).
//   DRAIN   2 cycles while the last term passes LATCH 1 and the LUT.
//   OUTPUT  8 cycles; SEL 2 = 0..7 streams Y(0)..Y(7) on O1 with out_valid;
//           done marks the last one.
// The control for later stages travels with the data through a two-stage
// shift of a small struct: one cycle after issue it drives the LUT (row k,
// column n, first term), one more cycle later, for the last term of a row, it
// writes LATCH 2 at ADDRESS = k. start is ignored while busy.
//
// The published architecture names the controller and has it drive every
// block; this schedule is this design's own.
//
// Timing: start seen in cycle 0 -> out_valid in cycles 67..74, done in 74;
// a new start is accepted from cycle 75.
module dct_controller
  import dct_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic load,
  output idx_t sel1,
  output logic l1_en,
  output logic lut_valid,
  output logic lut_first,
  output idx_t lut_k,
  output idx_t lut_n,
  output logic l2_we,
  output idx_t address,
  output idx_t sel2,
  output logic out_valid,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {IDLE, COMPUTE, DRAIN, OUTPUT} state_e;

  typedef struct packed {
    logic valid;
    logic first;
    logic last;
    idx_t k;
    idx_t n;
  } step_t;

  localparam int unsigned DRAIN_CYCLES = 2;

  state_e                state;
  logic [2*IDX_W-1:0]    cnt;     // {k, n} during COMPUTE
  idx_t                  ocnt;    // output index during OUTPUT
  logic [1:0]            dcnt;    // drain counter
  step_t                 issue, s1, s2;

  always_comb begin
    issue.valid = (state == COMPUTE);
    issue.k     = cnt[2*IDX_W-1:IDX_W];
    issue.n     = cnt[IDX_W-1:0];
    issue.first = (issue.n == '0);
    issue.last  = (issue.n == idx_t'(N - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      ocnt  <= '0;
      dcnt  <= '0;
      s1    <= '0;
      s2    <= '0;
    end else begin
      s1 <= issue;
      s2 <= s1;
      unique case (state)
        IDLE: if (start) begin
          state <= COMPUTE;
          cnt   <= '0;
        end
        COMPUTE: begin
          cnt <= cnt + 1'b1;
          if (cnt == '1) begin
            state <= DRAIN;
            dcnt  <= '0;
          end
        end
        DRAIN: begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == 2'(DRAIN_CYCLES - 1)) begin
            state <= OUTPUT;
            ocnt  <= '0;
          end
        end
        OUTPUT: begin
          ocnt <= ocnt + 1'b1;
          if (ocnt == idx_t'(N - 1)) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    load      = (state == IDLE) && start;
    sel1      = issue.n;
    l1_en     = issue.valid;
    lut_valid = s1.valid;
    lut_first = s1.first;
    lut_k     = s1.k;
    lut_n     = s1.n;
    l2_we     = s2.valid && s2.last;
    address   = s2.k;
    sel2      = ocnt;
    out_valid = (state == OUTPUT);
    busy      = (state != IDLE);
    done      = (state == OUTPUT) && (ocnt == idx_t'(N - 1));
  end

  // LATCH 2 is written only for the last term of a row
  a_we_last: assert property (@(posedge clk) disable iff (!rst_n) l2_we |-> s2.n == idx_t'(N - 1) && !s2.first);
  // the pipeline is empty whenever the output stream runs
  a_out_drained: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> !lut_valid && !l2_we);

endmodule
