// pipe_div: pipelined unsigned divider, 30-bit dividend by 20-bit divisor, 30-bit quotient.
//
// This is the single divider that the embedders share between the mask computation and the
// watermark-strength computation. A 10.10 dividend is presented with ten zero bits appended on
// the right (dividend * 1024), so the low 20 quotient bits are the 10.10 quotient of two 10.10
// numbers; q20 returns exactly those bits. The algorithm is restoring division, one quotient
// bit per step, with the 30 steps spread evenly over STAGES register levels. A new division may
// enter every clock cycle; its result appears STAGES cycles later with the valid bit and the
// caller's tag that travelled with it. The pipeline never stalls. Division by zero returns an
// all-ones quotient.
// The 30:20 size follows the document. The number of stages is its figure for the ASIC video and
// parallel image embedders (6); the FPGA builds used 11 (serial ASIC 5, serial FPGA 12). The
// restoring algorithm is this design's choice: the document does not say how the divider works.
module pipe_div #(
  parameter int unsigned STAGES = 6,
  parameter int unsigned TAG_W  = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [29:0]      dividend,
  input  logic [19:0]      divisor,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [29:0]      quotient,
  output logic [19:0]      q20,
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned NBITS = 30;
  localparam int unsigned PER   = (NBITS + STAGES - 1) / STAGES;

  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    logic [20:0]      rem;   // partial remainder
    logic [29:0]      rq;    // dividend bits still to use (top) / quotient bits (bottom)
    logic [19:0]      d;
  } st_t;

  st_t s_in;
  st_t stage_q [1:STAGES];

  assign s_in = '{valid: in_valid, tag: in_tag, rem: '0, rq: dividend, d: divisor};

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    st_t cur, nxt;
    if (s == 0) begin : g_first
      assign cur = s_in;
    end else begin : g_next
      assign cur = stage_q[s];
    end
    always_comb begin
      logic [50:0] acc;
      nxt = cur;
      acc = {cur.rem, cur.rq};
      for (int k = 0; k < int'(PER); k++) begin
        if (s * PER + k < NBITS) begin
          acc = acc << 1;
          if (acc[50:30] >= {1'b0, cur.d}) begin
            acc[50:30] = acc[50:30] - {1'b0, cur.d};
            acc[0]     = 1'b1;
          end
        end
      end
      nxt.rem = acc[50:30];
      nxt.rq  = acc[29:0];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) stage_q[s+1] <= '0;
      else        stage_q[s+1] <= nxt;
    end
  end

  assign out_valid = stage_q[STAGES].valid;
  assign out_tag   = stage_q[STAGES].tag;
  assign quotient  = stage_q[STAGES].rq;
  assign q20       = stage_q[STAGES].rq[19:0];
endmodule
