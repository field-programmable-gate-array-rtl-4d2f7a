// tb_cdpf_pl_accel -- end-to-end test of the crack-detection accelerators.
//
// Runs the top at its full 1280 x 1024 frame size. A synthetic crack image is
// generated here: a textured concrete-grey surface with a dark crack that
// wanders diagonally across the frame, in YUY2 with mild colour. For each
// frame the test programs the control registers over AXI4-Lite, streams the
// frame into the edge filter and the colour converter at the same time, and
// compares both output streams pixel by pixel with reference models computed
// here (Sobel |Ex|+|Ey| with border zeroed; RGB from the conversion formula
// in real arithmetic, within 1 LSB).
// Frames: (1) filter on, K = 2, no stalls, timed: both accelerators must keep
// one pixel per clock; (2) filter off (pass-through) with random input gaps
// and output back-pressure; (3) filter on with the stronger K = 5 operator,
// with gaps and back-pressure. At the end the frame counters are read back.
// Each mechanism (edge mode, pass-through mode, operator change, saturation
// of the edge value, RGB clamping, input gap, output stall) is counted and
// must happen at least once.
module tb_cdpf_pl_accel;
  import cdpf_pkg::*;

  localparam int W = IMG_WIDTH;
  localparam int H = IMG_HEIGHT;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  s_axil_awaddr, s_axil_araddr, s_axil_wstrb;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready;
  logic [15:0] edge_s_tdata, edge_m_tdata, rgb_s_tdata;
  logic        edge_s_tvalid, edge_s_tready, edge_s_tuser, edge_s_tlast;
  logic        edge_m_tvalid, edge_m_tready, edge_m_tuser, edge_m_tlast;
  logic        rgb_s_tvalid, rgb_s_tready, rgb_s_tuser, rgb_s_tlast;
  logic [23:0] rgb_m_tdata;
  logic        rgb_m_tvalid, rgb_m_tready, rgb_m_tuser, rgb_m_tlast;

  cdpf_pl_accel dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_edge_frames, n_pass_frames, n_k_changes, n_edge_sat, n_rgb_clamp, n_gaps, n_stalls;

  logic [15:0] img  [H][W];
  logic [15:0] exp_edge [H][W];
  logic [23:0] exp_rgb  [H][W];
  bit gaps, stalls;

  // ---------------- image and reference models ----------------
  function automatic void make_image(input int seed);
    int crack_c;
    crack_c = W / 4 + seed * 37;
    for (int r = 0; r < H; r++) begin
      if ($urandom_range(0, 2) == 0) crack_c += 1;       // drift to the right
      if ($urandom_range(0, 4) == 0) crack_c -= 1;
      for (int c = 0; c < W; c++) begin
        int y, d;
        y = 120 + int'($urandom_range(0, 24));           // concrete texture
        d = c - (crack_c % W);
        if (d >= -1 && d <= 1) y = 5 + int'($urandom_range(0, 6));  // the crack
        if (c % 2 == 0) img[r][c] = {8'(124 + $urandom_range(0, 8)), 8'(y)};  // U
        else            img[r][c] = {8'(126 + $urandom_range(0, 8)), 8'(y)};  // V
      end
    end
    // a saturated colour patch (clamps the colour converter)
    for (int r = 10; r < 20; r++)
      for (int c = 100; c < 140; c++)
        img[r][c] = {((c % 2) != 0) ? 8'hF0 : 8'h10, 8'd250};
  endfunction

  function automatic int clamp_round(input real v);
    int i;
    i = $rtoi(v + 0.5 + 1000.0) - 1000;
    return (i < 0) ? 0 : (i > 255) ? 255 : i;
  endfunction

  function automatic void make_reference(input bit edge_on, input int k);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        if (!edge_on) exp_edge[r][c] = img[r][c];
        else if (r == 0 || c == 0 || r == H - 1 || c == W - 1) exp_edge[r][c] = 16'h8000;
        else begin
          int gx, gy, e;
          gx = (int'(img[r-1][c+1][7:0]) + k * int'(img[r][c+1][7:0]) + int'(img[r+1][c+1][7:0]))
             - (int'(img[r-1][c-1][7:0]) + k * int'(img[r][c-1][7:0]) + int'(img[r+1][c-1][7:0]));
          gy = (int'(img[r+1][c-1][7:0]) + k * int'(img[r+1][c][7:0]) + int'(img[r+1][c+1][7:0]))
             - (int'(img[r-1][c-1][7:0]) + k * int'(img[r-1][c][7:0]) + int'(img[r-1][c+1][7:0]));
          e = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
          if (e > 255) begin
            e = 255;
            n_edge_sat++;
          end
          exp_edge[r][c] = {8'h80, 8'(e)};
        end
      end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c += 2) begin
        real u, v;
        u = real'(int'(img[r][c][15:8])) - 128.0;
        v = real'(int'(img[r][c+1][15:8])) - 128.0;
        for (int j = 0; j < 2; j++) begin
          real y, rr, gg, bb;
          y  = real'(int'(img[r][c+j][7:0]));
          rr = y + 1.402525 * v;
          gg = y - 0.343730 * u - 0.714401 * v;
          bb = y + 1.769905 * u + 0.000013 * v;
          if (rr > 255.5 || gg > 255.5 || bb > 255.5 || rr < -0.5 || gg < -0.5 || bb < -0.5)
            n_rgb_clamp++;
          exp_rgb[r][c+j] = {8'(clamp_round(bb)), 8'(clamp_round(gg)), 8'(clamp_round(rr))};
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

  // ---------------- AXI4-Lite master ----------------
  task automatic axil_write(input logic [3:0] a, input logic [31:0] d);
    s_axil_awaddr <= a; s_axil_wdata <= d; s_axil_wstrb <= 4'hF;
    s_axil_awvalid <= 1'b1; s_axil_wvalid <= 1'b1; s_axil_bready <= 1'b1;
    @(posedge clk);
    while (!s_axil_awready) @(posedge clk);
    s_axil_awvalid <= 1'b0; s_axil_wvalid <= 1'b0;
    @(posedge clk);
    while (!s_axil_bvalid) @(posedge clk);
    s_axil_bready <= 1'b0;
    @(posedge clk);
  endtask

  task automatic axil_read(input logic [3:0] a, output logic [31:0] d);
    s_axil_araddr <= a; s_axil_arvalid <= 1'b1; s_axil_rready <= 1'b1;
    @(posedge clk);
    while (!s_axil_arready) @(posedge clk);
    s_axil_arvalid <= 1'b0;
    @(posedge clk);
    while (!s_axil_rvalid) @(posedge clk);
    d = s_axil_rdata;
    s_axil_rready <= 1'b0;
    @(posedge clk);
  endtask

  // ---------------- stream drivers and monitors ----------------
  int edge_idx, rgb_idx;
  longint edge_t_last, rgb_t_last;

  always @(posedge clk) begin
    edge_m_tready <= stalls ? ($urandom_range(0, 7) != 0) : 1'b1;
    rgb_m_tready  <= stalls ? ($urandom_range(0, 7) != 0) : 1'b1;
    if (rst_n && ((edge_m_tvalid && !edge_m_tready) || (rgb_m_tvalid && !rgb_m_tready)))
      n_stalls++;
    if (rst_n && edge_m_tvalid && edge_m_tready) begin
      int r, c;
      r = edge_idx / W; c = edge_idx % W;
      if (edge_idx < H * W) begin
        if (edge_m_tdata != exp_edge[r][c] || edge_m_tuser != (edge_idx == 0) ||
            edge_m_tlast != (c == W - 1))
          check(1'b0, $sformatf("edge pixel (%0d,%0d) got %h want %h", r, c,
                                edge_m_tdata, exp_edge[r][c]));
        else checks++;
      end else check(1'b0, "extra edge beat");
      edge_idx++;
      edge_t_last = $time / 10;
    end
    if (rst_n && rgb_m_tvalid && rgb_m_tready) begin
      int r, c;
      r = rgb_idx / W; c = rgb_idx % W;
      if (rgb_idx < H * W) begin
        if (!close(rgb_m_tdata, exp_rgb[r][c]) || rgb_m_tuser != (rgb_idx == 0) ||
            rgb_m_tlast != (c == W - 1))
          check(1'b0, $sformatf("rgb pixel (%0d,%0d) got %h want %h", r, c,
                                rgb_m_tdata, exp_rgb[r][c]));
        else checks++;
      end else check(1'b0, "extra rgb beat");
      rgb_idx++;
      rgb_t_last = $time / 10;
    end
  end

  task automatic send_edge();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        while (gaps && $urandom_range(0, 7) == 0) begin
          edge_s_tvalid <= 1'b0; n_gaps++; @(posedge clk);
        end
        edge_s_tdata <= img[r][c]; edge_s_tuser <= (r == 0 && c == 0);
        edge_s_tlast <= (c == W - 1); edge_s_tvalid <= 1'b1;
        @(posedge clk);
        while (!edge_s_tready) @(posedge clk);
      end
    edge_s_tvalid <= 1'b0;
  endtask

  task automatic send_rgb();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        while (gaps && $urandom_range(0, 7) == 0) begin
          rgb_s_tvalid <= 1'b0; n_gaps++; @(posedge clk);
        end
        rgb_s_tdata <= img[r][c]; rgb_s_tuser <= (r == 0 && c == 0);
        rgb_s_tlast <= (c == W - 1); rgb_s_tvalid <= 1'b1;
        @(posedge clk);
        while (!rgb_s_tready) @(posedge clk);
      end
    rgb_s_tvalid <= 1'b0;
  endtask

  int last_k = 2;
  task automatic run_frame(input int seed, input bit edge_on, input int k, input bit timed);
    longint t0;
    logic [31:0] d;
    make_image(seed);
    make_reference(edge_on, k);
    axil_write(REG_CTRL, {25'd0, 3'(k), 3'd0, edge_on});
    axil_read(REG_CTRL, d);
    check(d[0] == edge_on && d[6:4] == 3'(k), "CTRL read back");
    if (k != last_k) n_k_changes++;
    last_k = k;
    if (edge_on) n_edge_frames++; else n_pass_frames++;
    edge_idx = 0; rgb_idx = 0;
    t0 = $time / 10;
    fork
      send_edge();
      send_rgb();
    join
    while (edge_idx < H * W || rgb_idx < H * W) @(posedge clk);
    repeat (4) @(posedge clk);
    check(edge_idx == H * W && rgb_idx == H * W, "no extra beats after frame");
    if (timed) begin
      // one pixel per clock: edge filter walks (H+1)(W+1) raster positions,
      // the converter takes H*W pixels; allow a few cycles of latency.
      check(edge_t_last - t0 <= longint'(int'((H + 1) * (W + 1) + 4)),
            $sformatf("edge frame took %0d cycles", edge_t_last - t0));
      check(rgb_t_last - t0 <= longint'(int'(H * W + 4)),
            $sformatf("rgb frame took %0d cycles", rgb_t_last - t0));
      $display("frame cycles: edge %0d (raster %0d), rgb %0d (pixels %0d)",
               edge_t_last - t0, (H + 1) * (W + 1), rgb_t_last - t0, H * W);
    end
  endtask

  logic [31:0] d;
  initial begin
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0;
    s_axil_bready = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    edge_s_tvalid = 0; edge_s_tdata = 0; edge_s_tuser = 0; edge_s_tlast = 0;
    rgb_s_tvalid = 0; rgb_s_tdata = 0; rgb_s_tuser = 0; rgb_s_tlast = 0;
    gaps = 0; stalls = 0;
    n_edge_frames = 0; n_pass_frames = 0; n_k_changes = 0; n_edge_sat = 0;
    n_rgb_clamp = 0; n_gaps = 0; n_stalls = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    axil_read(REG_GEOMETRY, d);
    check(d == {16'(H), 16'(W)}, "geometry register");

    run_frame(0, 1'b1, 2, 1'b1);
    gaps = 1; stalls = 1;
    run_frame(1, 1'b0, 2, 1'b0);
    run_frame(2, 1'b1, 5, 1'b0);

    axil_read(REG_EDGE_FRAMES, d);
    check(d == 32'd3, $sformatf("edge frame counter %0d", d));
    axil_read(REG_RGB_FRAMES, d);
    check(d == 32'd3, $sformatf("rgb frame counter %0d", d));

    $display("mechanisms: edge frames %0d, pass-through frames %0d, operator changes %0d,",
             n_edge_frames, n_pass_frames, n_k_changes);
    $display("            edge saturations %0d, rgb clamps %0d, input gaps %0d, output stalls %0d",
             n_edge_sat, n_rgb_clamp, n_gaps, n_stalls);
    check(n_edge_frames > 0, "edge mode exercised");
    check(n_pass_frames > 0, "pass-through mode exercised");
    check(n_k_changes > 0, "operator change exercised");
    check(n_edge_sat > 0, "edge saturation exercised");
    check(n_rgb_clamp > 0, "rgb clamping exercised");
    check(n_gaps > 0, "input gaps exercised");
    check(n_stalls > 0, "output stalls exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
