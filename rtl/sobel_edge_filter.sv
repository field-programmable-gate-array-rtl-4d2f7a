// sobel_edge_filter -- streaming 3x3 Sobel edge detector for YUY2 frames.
//
// What it does: turns a YUY2 camera frame into a grey-scale edge map. The luma
// byte of every pixel is already the intensity, so no grey conversion is
// needed. Two 3x3 masks are applied to it: Ex with columns weighted
// [-1 -K -1] (left) and [1 K 1] (right), Ey with rows weighted [-1 -K -1]
// (top) and [1 K 1] (bottom). The gradient magnitude is approximated as
// E = |Ex| + |Ey| and saturated to 255. K is the "Sobel operator" centre weight:
// 2 gives the usual [1 2 1] operator, 1 and 5 the weaker and stronger variants.
// All of this follows the document; the rest is this design's own choice:
//   * Output pixels on the outer frame border (first/last row and column)
//     are 0, because their 3x3 window leaves the image.
//   * The edge map is sent as grey YUY2: Y = E, chroma = 0x80.
//   * enable = 0 is the "filter off" mode: pixels pass through unchanged,
//     with the same latency. enable and centre_weight are sampled with the
//     first pixel of a frame and hold for that whole frame.
//
// How it works: two line buffers hold the two rows above the incoming pixel
// and a 3x2 register window the two previous columns. The line buffers have a
// registered read port whose address runs one column ahead, so they map onto
// block RAM. The module walks a virtual raster of (HEIGHT+1) x (WIDTH+1)
// positions; the extra column and the extra row are padding that consumes no
// input, so the last column and the last row leave the filter without waiting
// for the next frame. At position
// (r, c) with r, c >= 1 it emits output pixel (r-1, c-1).
//
// Interface: AXI4-Stream style, in and out. tdata is one 16-bit YUY2 word
// (bits [7:0] Y, bits [15:8] chroma), tuser marks the first pixel of a frame,
// tlast the last pixel of a line. Input beats that arrive while the filter
// waits for a frame start and carry no tuser are dropped; tlast on the input
// is not used (lines are counted).
//
// Timing: one position per clock when the output is not stalled, so a frame
// takes (HEIGHT+1)*(WIDTH+1) cycles; output pixel (r, c) leaves one line and
// one pixel after input pixel (r, c) entered, in the cycle after its window is
// complete. frame_done pulses when the last pixel of a frame is emitted.
module sobel_edge_filter
  import cdpf_pkg::*;
#(
  parameter int unsigned WIDTH  = IMG_WIDTH,
  parameter int unsigned HEIGHT = IMG_HEIGHT
) (
  input  logic        clk,
  input  logic        rst_n,
  // control
  input  logic        enable,         // 1: edge map, 0: pass-through
  input  logic [2:0]  centre_weight,  // K of the Sobel operator
  // input stream
  input  logic [15:0] s_tdata,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic        s_tuser,
  input  logic        s_tlast,
  // output stream
  output logic [15:0] m_tdata,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic        m_tuser,
  output logic        m_tlast,
  // status
  output logic        frame_done
);

  localparam int unsigned CW = $clog2(WIDTH + 1);
  localparam int unsigned RW = $clog2(HEIGHT + 1);

  // Raster position of the next virtual input pixel.
  logic [CW-1:0] col_q;
  logic [RW-1:0] row_q;

  // Line buffers: row r-2 (luma only) and row r-1 (full word, for pass-through).
  logic [7:0]  lb_top [WIDTH];
  yuy2_px_t    lb_mid [WIDTH];

  // Window columns c-2 (index 0) and c-1 (index 1).
  logic [7:0]  w_top [2];
  logic [7:0]  w_mid [2];
  logic [7:0]  w_bot [2];
  yuy2_px_t    mid_px_q;  // full word of the centre pixel (r-1, c-1)

  // Mode for the frame in flight.
  logic        mode_edge_q;
  logic [2:0]  k_q;

  logic pad, at_start, drop, out_ok, adv, produce;
  logic [CW-1:0] ocol;
  logic [RW-1:0] orow;
  logic [7:0]  n_top, n_mid, n_bot;
  yuy2_px_t    n_mid_px, s_px;
  logic        border;
  logic [7:0]  edge_mag;

  assign s_px     = yuy2_px_t'(s_tdata);
  assign pad      = (row_q == RW'(HEIGHT)) || (col_q == CW'(WIDTH));
  assign at_start = (row_q == '0) && (col_q == '0);
  assign drop     = at_start && s_tvalid && !s_tuser;
  assign out_ok   = !m_tvalid || m_tready;
  assign adv      = out_ok && (pad || (s_tvalid && !drop));
  assign s_tready = !pad && (drop || out_ok);
  assign produce  = adv && (row_q != '0) && (col_q != '0);
  assign ocol     = col_q - CW'(1);
  assign orow     = row_q - RW'(1);

  // Line buffers are read synchronously (block-RAM style): the read address
  // runs one column ahead whenever the raster advances, so the read register
  // always holds column c of rows r-2 and r-1.
  logic [CW-1:0] col_next, rd_addr;
  logic [7:0]    top_rd;
  yuy2_px_t      mid_rd;
  assign col_next = (col_q == CW'(WIDTH)) ? '0 : col_q + CW'(1);
  assign rd_addr  = adv ? col_next : col_q;

  always_ff @(posedge clk) begin
    if (rd_addr != CW'(WIDTH)) begin
      top_rd <= lb_top[rd_addr];
      mid_rd <= lb_mid[rd_addr];
    end
  end

  // New window column (column c): rows r-2, r-1 from the line buffers, row r
  // from the input (zero on padding positions).
  always_comb begin
    if (col_q == CW'(WIDTH)) begin
      n_top    = '0;
      n_mid    = '0;
      n_mid_px = '0;
    end else begin
      n_top    = top_rd;
      n_mid_px = mid_rd;
      n_mid    = n_mid_px.y;
    end
    n_bot = pad ? 8'd0 : s_px.y;
  end

  // Sobel masks on the window [c-2, c-1, c].
  logic signed [13:0] gx, gy, ax, ay;
  logic        [14:0] mag;
  logic signed [13:0] k_s;
  assign k_s = 14'(k_q);

  always_comb begin
    gx = (14'(n_top) + k_s * 14'(n_mid) + 14'(n_bot))
       - (14'(w_top[0]) + k_s * 14'(w_mid[0]) + 14'(w_bot[0]));
    gy = (14'(w_bot[0]) + k_s * 14'(w_bot[1]) + 14'(n_bot))
       - (14'(w_top[0]) + k_s * 14'(w_top[1]) + 14'(n_top));
    ax  = (gx < 0) ? -gx : gx;
    ay  = (gy < 0) ? -gy : gy;
    mag = 15'(ax) + 15'(ay);
    edge_mag = (mag > 15'd255) ? 8'hFF : mag[7:0];
    border = (orow == '0) || (orow == RW'(HEIGHT - 1)) ||
             (ocol == '0) || (ocol == CW'(WIDTH - 1));
  end

  always_ff @(posedge clk) begin
    if (adv && col_q != CW'(WIDTH)) begin
      lb_top[col_q] <= n_mid;
      lb_mid[col_q] <= pad ? yuy2_px_t'('0) : s_px;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q       <= '0;
      row_q       <= '0;
      w_top       <= '{default: '0};
      w_mid       <= '{default: '0};
      w_bot       <= '{default: '0};
      mid_px_q    <= '0;
      mode_edge_q <= 1'b1;
      k_q         <= SOBEL_CENTRE_DEFAULT;
      m_tvalid    <= 1'b0;
      m_tdata     <= '0;
      m_tuser     <= 1'b0;
      m_tlast     <= 1'b0;
      frame_done  <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;

      if (adv) begin
        // shift the window
        w_top[0] <= w_top[1];  w_top[1] <= n_top;
        w_mid[0] <= w_mid[1];  w_mid[1] <= n_mid;
        w_bot[0] <= w_bot[1];  w_bot[1] <= n_bot;
        mid_px_q <= n_mid_px;

        if (at_start) begin
          mode_edge_q <= enable;
          k_q         <= centre_weight;
        end

        // advance the raster
        if (col_q == CW'(WIDTH)) begin
          col_q <= '0;
          row_q <= (row_q == RW'(HEIGHT)) ? '0 : row_q + RW'(1);
        end else begin
          col_q <= col_q + CW'(1);
        end
      end

      if (produce) begin
        m_tvalid <= 1'b1;
        m_tuser  <= (orow == '0) && (ocol == '0);
        m_tlast  <= (ocol == CW'(WIDTH - 1));
        if (mode_edge_q)
          m_tdata <= {CHROMA_NEUTRAL, border ? 8'd0 : edge_mag};
        else
          m_tdata <= mid_px_q;
        frame_done <= (orow == RW'(HEIGHT - 1)) && (ocol == CW'(WIDTH - 1));
      end
    end
  end

  // Stream rule: a pending output beat holds still until it is taken.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata));

  logic unused;
  assign unused = s_tlast;

endmodule
