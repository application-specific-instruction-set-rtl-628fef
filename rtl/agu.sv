// agu: address generation unit of the ASIP, owner of the local pixel memory.
//
// Loader (LD). A pulse on ld_start copies a square area of the frame memory
// into the local memory: with ld_sel = 0 the 16x16 macroblock of the current
// frame whose top-left pixel is (ld_x, ld_y), with ld_sel = 1 the SA_DIM x
// SA_DIM search area of the reference frame whose top-left pixel is
// (ld_x, ld_y). The frame memory address of a pixel is y * FRAME_W + x. One
// read is issued per cycle, raster order; the frame memory returns the pixel
// on the cycle after ext_re and the loader writes it into the local memory on
// that cycle. busy is high from the cycle after ld_start until the last pixel
// is written, N*N + 1 cycles in all (N = 16 or SA_DIM). The loader runs on its
// own, in parallel with the rest of the processor; ld_start while busy is
// ignored (the control unit stalls such an LD). No pixel is fetched twice
// within one LD, and nothing is reused between LDs.
//
// Pixel supply (SAD16). sad_cap captures the two line pointers: ptr_mb, an
// address in the macroblock array (row * 16 + column) and ptr_ca, an address
// in the search-area array (row * SA_STRIDE + column). Each sad_step advances
// a pixel index k; mb_px and cand_px (combinational) are the pixels at
// ptr_mb + k and ptr_ca + k.
//
// The document specifies what the AGU does (fetch a macroblock or a search
// area for LD, in parallel with the other units, and feed the SADU); the
// raster loader, the addressing, the 1-cycle frame-memory read latency and
// the pointer format are this design's choices.
module agu
  import asip_pkg::*;
#(
  parameter int unsigned FRAME_W   = 176,
  parameter int unsigned FRAME_H   = 144,
  parameter int unsigned SA_DIM    = 31,
  parameter int unsigned EXT_AW    = $clog2(FRAME_W * FRAME_H),
  parameter int unsigned SA_STRIDE = 2 ** $clog2(SA_DIM),
  parameter int unsigned SA_AW     = $clog2(SA_STRIDE * SA_DIM)
) (
  input  logic              clk,
  input  logic              rst_n,
  // LD
  input  logic              ld_start,
  input  logic              ld_sel,
  input  word_t             ld_x,
  input  word_t             ld_y,
  output logic              busy,
  // frame memory read port
  output logic              ext_re,
  output logic              ext_frame,   // 0 = current frame, 1 = reference frame
  output logic [EXT_AW-1:0] ext_addr,
  input  pixel_t            ext_rdata,
  // SAD16 pixel supply
  input  logic              sad_cap,
  input  word_t             ptr_mb,
  input  word_t             ptr_ca,
  input  logic              sad_step,
  output pixel_t            mb_px,
  output pixel_t            cand_px
);

  localparam int unsigned CW = $clog2(SA_STRIDE);   // column counter width
  localparam int unsigned RW = $clog2(SA_DIM);      // row counter width

  // ---------------- loader ----------------
  logic              issuing, sel_q;
  logic [CW-1:0]     col;
  logic [RW-1:0]     row;
  logic [EXT_AW-1:0] row_base;
  logic [CW-1:0]     last_idx;
  logic              wr_v;
  logic [SA_AW-1:0]  wr_addr;
  logic [SA_AW-1:0]  lm_addr;

  always_comb begin
    last_idx  = sel_q ? CW'(SA_DIM - 1) : CW'(MB_N - 1);
    ext_re    = issuing;
    ext_frame = sel_q;
    ext_addr  = row_base + EXT_AW'(col);
    lm_addr   = sel_q ? SA_AW'({row, col}) : SA_AW'({row[3:0], col[3:0]});
    busy      = issuing | wr_v;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      sel_q    <= 1'b0;
      col      <= '0;
      row      <= '0;
      row_base <= '0;
      wr_v     <= 1'b0;
      wr_addr  <= '0;
    end else begin
      wr_v    <= issuing;
      wr_addr <= lm_addr;
      if (!busy && ld_start) begin
        issuing  <= 1'b1;
        sel_q    <= ld_sel;
        col      <= '0;
        row      <= '0;
        row_base <= EXT_AW'(32'(ld_y) * FRAME_W + 32'(ld_x));
      end else if (issuing) begin
        if (col == last_idx) begin
          col      <= '0;
          row_base <= row_base + EXT_AW'(FRAME_W);
          if (row == RW'(last_idx)) issuing <= 1'b0;
          else                      row     <= row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  // ---------------- SAD16 pixel supply ----------------
  word_t      mb_ptr_q, ca_ptr_q;
  logic [3:0] k;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mb_ptr_q <= '0;
      ca_ptr_q <= '0;
      k        <= '0;
    end else if (sad_cap) begin
      mb_ptr_q <= ptr_mb;
      ca_ptr_q <= ptr_ca;
      k        <= '0;
    end else if (sad_step) begin
      k <= k + 1'b1;
    end
  end

  local_mem #(.SA_DIM(SA_DIM), .SA_STRIDE(SA_STRIDE), .SA_AW(SA_AW)) u_mem (
    .clk      (clk),
    .we       (wr_v),
    .wsel     (sel_q),
    .waddr    (wr_addr),
    .wdata    (ext_rdata),
    .mb_raddr (mb_ptr_q[7:0] + 8'(k)),
    .mb_rdata (mb_px),
    .sa_raddr (SA_AW'(ca_ptr_q) + SA_AW'(k)),
    .sa_rdata (cand_px)
  );

endmodule
