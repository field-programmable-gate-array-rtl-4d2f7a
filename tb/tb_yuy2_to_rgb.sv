// tb_yuy2_to_rgb -- self-checking test of the YUY2 to RGB converter.
//
// Sends small YUY2 frames (random pixels plus corner cases: black, white,
// extreme chroma that must clamp) and compares each RGB output pixel with the
// conversion formula evaluated here in real arithmetic, rounded and clamped;
// the fixed-point hardware may differ by at most 1 per channel. It also
// checks tuser/tlast placement, one frame_done per frame, and that with a
// continuous input and a ready sink the converter never refuses a pixel
// (one pixel per clock). Later frames add random input gaps and output
// back-pressure.
module tb_yuy2_to_rgb;
  import cdpf_pkg::*;

  localparam int W = 8;
  localparam int H = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] s_tdata;
  logic [23:0] m_tdata;
  logic        s_tvalid, s_tready, s_tuser, s_tlast;
  logic        m_tvalid, m_tready, m_tuser, m_tlast, frame_done;

  yuy2_to_rgb #(.HEIGHT(H)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] img [H][W];
  logic [23:0] expd [H][W];
  bit gaps, stalls;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int conv(input real v);
    int i;
    i = $rtoi(v + 0.5 + 1000.0) - 1000;   // round half up
    if (i < 0) i = 0;
    if (i > 255) i = 255;
    return i;
  endfunction

  function automatic void make_frame(input int kind);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r][c] = 16'($urandom);
    if (kind == 1) begin
      img[0][0] = 16'h0000; img[0][1] = 16'h0000;   // Y=0, U=V=0: clamps low/high
      img[0][2] = 16'hFFFF; img[0][3] = 16'hFFFF;   // Y=255, U=V=255
      img[1][0] = 16'h8010; img[1][1] = 16'h80EB;   // neutral chroma: grey
      img[1][2] = 16'hFF40; img[1][3] = 16'h0040;   // strong blue
    end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c += 2) begin
        real u, v;
        u = real'(int'(img[r][c][15:8])) - 128.0;
        v = real'(int'(img[r][c+1][15:8])) - 128.0;
        for (int k = 0; k < 2; k++) begin
          real y;
          y = real'(int'(img[r][c+k][7:0]));
          expd[r][c+k] = {8'(conv(y + 1.769905 * u + 0.000013 * v)),
                          8'(conv(y - 0.343730 * u - 0.714401 * v)),
                          8'(conv(y + 1.402525 * v))};
        end
      end
  endfunction

  function automatic bit close(input logic [23:0] a, input logic [23:0] b);
    for (int i = 0; i < 3; i++) begin
      int d;
      d = int'(a[8*i +: 8]) - int'(b[8*i +: 8]);
      if (d > 1 || d < -1) return 1'b0;
    end
    return 1'b1;
  endfunction

  int out_idx, refused, done_count;
  always @(posedge clk) begin
    m_tready <= stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
    if (frame_done) done_count++;
    if (rst_n && !gaps && !stalls && s_tvalid && !s_tready) refused++;
    if (rst_n && m_tvalid && m_tready) begin
      int r, c;
      r = out_idx / W;
      c = out_idx % W;
      if (out_idx < H * W) begin
        check(close(m_tdata, expd[r][c]),
              $sformatf("pixel (%0d,%0d) in %h%h got %h want %h", r, c,
                        img[r][c - c % 2 + 1], img[r][c - c % 2], m_tdata, expd[r][c]));
        check(m_tuser == (out_idx == 0), $sformatf("tuser at %0d", out_idx));
        check(m_tlast == (c == W - 1), $sformatf("tlast at %0d", out_idx));
      end else check(1'b0, "extra output beat");
      out_idx++;
    end
  end

  task automatic run_frame(input int kind);
    int d0;
    make_frame(kind);
    out_idx = 0;
    d0 = done_count;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        while (gaps && $urandom_range(0, 3) == 0) begin
          s_tvalid <= 1'b0; @(posedge clk);
        end
        s_tdata  <= img[r][c];
        s_tuser  <= (r == 0 && c == 0);
        s_tlast  <= (c == W - 1);
        s_tvalid <= 1'b1;
        @(posedge clk);
        while (!s_tready) @(posedge clk);
      end
    s_tvalid <= 1'b0;
    while (out_idx < H * W) @(posedge clk);
    repeat (3) @(posedge clk);
    check(done_count == d0 + 1, "one frame_done per frame");
  endtask

  initial begin
    s_tvalid = 0; s_tdata = 0; s_tuser = 0; s_tlast = 0;
    gaps = 0; stalls = 0; refused = 0; done_count = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_frame(1);
    run_frame(0);
    check(refused == 0, $sformatf("converter refused %0d pixels at full rate", refused));
    gaps = 1; stalls = 1;
    for (int i = 0; i < 20; i++) run_frame(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
