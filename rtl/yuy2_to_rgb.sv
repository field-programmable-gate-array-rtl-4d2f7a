// yuy2_to_rgb -- streaming YUY2 to 24-bit RGB colour-space converter.
//
// What it does: every pair of YUY2 pixels (Y0 U0)(Y1 V0) shares one blue
// difference U and one red difference V. For each pixel of the pair, with
// Cb = U - 128 and Cr = V - 128, the converter computes
//   R = Y + 1.402525 Cr
//   G = Y - 0.343730 Cb - 0.714401 Cr
//   B = Y + 1.769905 Cb + 0.000013 Cr
// and clamps each result to 0..255. The formula and the pixel layout follow
// the document. Its own choices: the coefficients are 16-bit fixed point
// (cdpf_pkg), results are rounded to nearest and the chroma offset is 128.
// Pixels are paired by simple alternation, so every line must have an even
// number of pixels (1280 has).
//
// How it works: the even pixel's word is held until its odd partner arrives;
// then both RGB pixels are computed at once, one goes to the output register
// and the other to a one-entry pending register that follows it out.
//
// Interface: AXI4-Stream style. Input tdata is one 16-bit YUY2 word (bits
// [7:0] Y, bits [15:8] U or V), output tdata one RGB pixel (bits [7:0] R,
// [15:8] G, [23:16] B). tuser (start of frame) and tlast (end of line) travel
// with their pixels.
//
// Timing: one pixel per clock in steady state. The first RGB pixel of a pair
// is valid in the cycle after the odd input word is accepted, the second one
// cycle later. frame_done pulses when the last pixel of a frame (the one with
// tlast on line HEIGHT-1) is emitted; lines are counted for that.
module yuy2_to_rgb
  import cdpf_pkg::*;
#(
  parameter int unsigned HEIGHT = IMG_HEIGHT
) (
  input  logic        clk,
  input  logic        rst_n,
  // input stream
  input  logic [15:0] s_tdata,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic        s_tuser,
  input  logic        s_tlast,
  // output stream
  output logic [23:0] m_tdata,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic        m_tuser,
  output logic        m_tlast,
  // status
  output logic        frame_done
);

  localparam int unsigned RW = $clog2(HEIGHT + 1);

  // Held even pixel.
  logic       hold_valid;
  yuy2_px_t   hold_px;
  logic       hold_user;

  // Pending second pixel of a pair.
  logic       pend_valid;
  rgb_px_t    pend_px;
  logic       pend_last;
  logic       pend_fdone;

  logic [RW-1:0] line_q;   // output line counter for frame_done
  logic          m_fdone;  // the beat in m_tdata ends a frame

  yuy2_px_t s_px;
  logic acc_even, acc_odd, take_out;
  rgb_px_t rgb0, rgb1;

  assign s_px     = yuy2_px_t'(s_tdata);
  assign take_out = m_tvalid && m_tready;
  assign s_tready = hold_valid ? (!pend_valid && (!m_tvalid || m_tready)) : 1'b1;
  assign acc_even = s_tvalid && s_tready && !hold_valid;
  assign acc_odd  = s_tvalid && s_tready && hold_valid;

  // Conversion of one pixel in Q16.
  function automatic logic [7:0] clamp8(input logic signed [27:0] v);
    logic signed [27:0] r;
    r = (v + 28'sd32768) >>> COEF_FRAC;
    if (r < 0)        return 8'd0;
    else if (r > 255) return 8'd255;
    else              return r[7:0];
  endfunction

  function automatic rgb_px_t convert(input logic [7:0] y, input logic [7:0] u,
                                      input logic [7:0] v);
    logic signed [27:0] ys, cb, cr;
    rgb_px_t p;
    ys = 28'(y) <<< COEF_FRAC;
    cb = 28'(u) - 28'sd128;
    cr = 28'(v) - 28'sd128;
    p.r = clamp8(ys + 28'(COEF_R_CR) * cr);
    p.g = clamp8(ys - 28'(COEF_G_CB) * cb - 28'(COEF_G_CR) * cr);
    p.b = clamp8(ys + 28'(COEF_B_CB) * cb + 28'(COEF_B_CR) * cr);
    return p;
  endfunction

  assign rgb0 = convert(hold_px.y, hold_px.c, s_px.c);
  assign rgb1 = convert(s_px.y,    hold_px.c, s_px.c);

  logic odd_ends_frame;
  assign odd_ends_frame = s_tlast && (line_q == RW'(HEIGHT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_valid <= 1'b0;
      hold_px    <= '0;
      hold_user  <= 1'b0;
      pend_valid <= 1'b0;
      pend_px    <= '0;
      pend_last  <= 1'b0;
      pend_fdone <= 1'b0;
      m_tvalid   <= 1'b0;
      m_tdata    <= '0;
      m_tuser    <= 1'b0;
      m_tlast    <= 1'b0;
      m_fdone    <= 1'b0;
      line_q     <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= take_out && m_fdone;

      // output register: emptied by the sink, refilled from pending
      if (take_out) begin
        m_tvalid <= 1'b0;
        if (pend_valid) begin
          m_tvalid   <= 1'b1;
          m_tdata    <= pend_px;
          m_tuser    <= 1'b0;
          m_tlast    <= pend_last;
          m_fdone    <= pend_fdone;
          pend_valid <= 1'b0;
        end
      end

      if (acc_even) begin
        hold_valid <= 1'b1;
        hold_px    <= s_px;
        hold_user  <= s_tuser;
        if (s_tuser) line_q <= '0;
      end

      if (acc_odd) begin
        hold_valid <= 1'b0;
        m_tvalid   <= 1'b1;
        m_tdata    <= rgb0;
        m_tuser    <= hold_user;
        m_tlast    <= 1'b0;
        m_fdone    <= 1'b0;
        pend_valid <= 1'b1;
        pend_px    <= rgb1;
        pend_last  <= s_tlast;
        pend_fdone <= odd_ends_frame;
        if (s_tlast)
          line_q <= odd_ends_frame ? '0 : line_q + RW'(1);
      end
    end
  end

  // Stream rule: a pending output beat holds still until it is taken.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata));

endmodule
