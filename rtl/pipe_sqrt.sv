// pipe_sqrt: pipelined integer square root, 20-bit radicand, 10-bit root.
//
// Read as fixed point, a 10.10 radicand R has the root sqrt(R/1024) = sqrt(R)/32, so the 10-bit
// integer root is that root in 5.5 format; root_fx returns it placed in 10.10 (five zeros on each
// side), as the watermark-strength block needs. The algorithm is the restoring digit-by-digit
// method, one root bit per step, ten steps spread over STAGES register levels; a new operand may
// enter each cycle and its root appears STAGES cycles later. The 20-bit input, 10-bit 5.5
// output and the widening to 10.10 follow the document; the two stages are its figure for the
// ASIC and parallel FPGA builds, and the algorithm is this design's choice.
module pipe_sqrt #(
  parameter int unsigned STAGES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [19:0] radicand,
  output logic        out_valid,
  output logic [9:0]  root,
  output logic [19:0] root_fx
);
  localparam int unsigned NB  = 10;
  localparam int unsigned PER = (NB + STAGES - 1) / STAGES;

  typedef struct packed {
    logic        valid;
    logic [19:0] rad;   // radicand bits still to use, two per step, MSBs first
    logic [13:0] rem;   // partial remainder
    logic [9:0]  q;     // root bits so far
  } st_t;

  st_t s_in;
  st_t stage_q [1:STAGES];
  assign s_in = '{valid: in_valid, rad: radicand, rem: '0, q: '0};

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    st_t cur, nxt;
    if (s == 0) begin : g_first
      assign cur = s_in;
    end else begin : g_next
      assign cur = stage_q[s];
    end
    always_comb begin
      logic [13:0] trial;
      nxt = cur;
      for (int k = 0; k < int'(PER); k++) begin
        if (s * PER + k < NB) begin
          nxt.rem = {nxt.rem[11:0], nxt.rad[19:18]};
          nxt.rad = nxt.rad << 2;
          trial   = {2'b00, nxt.q, 2'b01};
          if (nxt.rem >= trial) begin
            nxt.rem = nxt.rem - trial;
            nxt.q   = {nxt.q[8:0], 1'b1};
          end else begin
            nxt.q   = {nxt.q[8:0], 1'b0};
          end
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) stage_q[s+1] <= '0;
      else        stage_q[s+1] <= nxt;
    end
  end

  assign out_valid = stage_q[STAGES].valid;
  assign root      = stage_q[STAGES].q;
  assign root_fx   = {5'b0, stage_q[STAGES].q, 5'b0};
endmodule
