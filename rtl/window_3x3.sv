// window_3x3: line buffers and 3x3 window registers over a raster pixel stream.
//
// The frame (IMG_M rows of IMG_N pixels) is scanned as IMG_M+1 rows of IMG_N+1 positions: the
// extra column and the extra row carry zeros and give the last column and row their lower and
// right neighbours. Each adv moves the scan one position; at positions inside the frame
// (need_pix high) the caller supplies the next pixel on pix_in, elsewhere a zero enters. Three
// rows of three registers hold the window; the stream runs through the top register row, on
// through a line buffer into the middle row and through a second line buffer into the bottom
// row, so the window always holds rows r-2..r and columns c-2..c around the position (r,c) just
// entered. Its centre is pixel (r-1, c-1). One cycle after the adv that completes a window,
// center_valid is high and nbhd holds the nine pixels in 10.10 format, row by row, with every
// pixel outside the frame forced to zero; center_addr is the raster address of the centre and
// center_last marks the last pixel of the frame. pix_addr is the raster address of the pixel
// taken at the current position.
// Two line buffers and three window registers per row follow the document; each line buffer
// is a circular buffer of IMG_N-2 entries, which behaves as the document's shift register.
// The padding scan and the explicit masking are this design's choices.
module window_3x3
  import wm_pkg::*;
#(
  parameter int unsigned IMG_M = 720,
  parameter int unsigned IMG_N = 1280,
  localparam int unsigned AW = $clog2(IMG_M * IMG_N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          adv,
  input  pix_t          pix_in,
  output logic          need_pix,
  output logic [AW-1:0] pix_addr,
  output logic          center_valid,
  output logic [AW-1:0] center_addr,
  output logic          center_last,
  output fx_t           nbhd [9]
);
  localparam int unsigned LB_D = IMG_N - 2;
  localparam int unsigned RW = $clog2(IMG_M + 1);
  localparam int unsigned CWD = $clog2(IMG_N + 1);
  localparam int unsigned PW = (LB_D > 1) ? $clog2(LB_D) : 1;

  logic [RW-1:0]  sr;
  logic [CWD-1:0] sc;
  pix_t           win [3][3];
  pix_t           lb0 [LB_D];
  pix_t           lb1 [LB_D];
  logic [PW-1:0]  lb_ptr;
  logic [2:0]     row_ok, col_ok;
  logic [AW-1:0]  c_addr_next;

  pix_t v;
  assign need_pix = (sr < RW'(IMG_M)) && (sc < CWD'(IMG_N));
  assign v        = need_pix ? pix_in : 8'd0;

  logic scan_end, has_center;
  assign scan_end   = (sr == RW'(IMG_M)) && (sc == CWD'(IMG_N));
  assign has_center = (sr != 0) && (sc != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr           <= '0;
      sc           <= '0;
      lb_ptr       <= '0;
      pix_addr     <= '0;
      c_addr_next  <= '0;
      center_valid <= 1'b0;
      center_addr  <= '0;
      center_last  <= 1'b0;
      row_ok       <= '0;
      col_ok       <= '0;
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) win[a][b] <= '0;
    end else begin
      center_valid <= 1'b0;
      if (adv) begin
        // window and line buffers
        win[2][2] <= v;
        win[2][1] <= win[2][2];
        win[2][0] <= win[2][1];
        lb1[lb_ptr] <= win[2][0];
        win[1][2] <= lb1[lb_ptr];
        win[1][1] <= win[1][2];
        win[1][0] <= win[1][1];
        lb0[lb_ptr] <= win[1][0];
        win[0][2] <= lb0[lb_ptr];
        win[0][1] <= win[0][2];
        win[0][0] <= win[0][1];
        lb_ptr <= (lb_ptr == PW'(LB_D - 1)) ? '0 : lb_ptr + 1'b1;
        // centre (sr-1, sc-1) bookkeeping
        if (has_center) begin
          center_valid <= 1'b1;
          center_addr  <= c_addr_next;
          center_last  <= (sr == RW'(IMG_M)) && (sc == CWD'(IMG_N));
          c_addr_next  <= (sr == RW'(IMG_M) && sc == CWD'(IMG_N)) ? '0 : c_addr_next + 1'b1;
          row_ok <= {sr != RW'(IMG_M), 1'b1, sr != RW'(1)};
          col_ok <= {sc != CWD'(IMG_N), 1'b1, sc != CWD'(1)};
        end
        // scan position
        if (need_pix) pix_addr <= (pix_addr == AW'(IMG_M * IMG_N - 1)) ? '0 : pix_addr + 1'b1;
        if (scan_end) begin
          sr <= '0;
          sc <= '0;
        end else if (sc == CWD'(IMG_N)) begin
          sc <= '0;
          sr <= sr + 1'b1;
        end else begin
          sc <= sc + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        nbhd[a*3+b] = (row_ok[a] && col_ok[b]) ? fx_from_pix(win[a][b]) : '0;
  end
endmodule
