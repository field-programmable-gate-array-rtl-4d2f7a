// tb_sobel_edge_filter -- self-checking test of the streaming Sobel filter.
//
// Drives random YUY2 frames (small size, set by parameters below) through the
// filter and compares every output pixel with a reference edge map computed
// here from the same frame: |Ex| + |Ey| with centre weight K, saturated at
// 255, zero on the border, chroma 0x80; or the input word in pass-through.
// Frames cover K = 2 (the normal operator), K = 1, K = 5, pass-through, a
// mode change requested in the middle of a frame (must apply to the next
// frame only), junk beats before a frame start (must be dropped), and random
// gaps on the input and random back-pressure on the output. The first frame
// runs with no gaps or stalls and its duration is checked against the
// (HEIGHT+1) x (WIDTH+1) cycles the filter needs.
module tb_sobel_edge_filter;
  import cdpf_pkg::*;

  localparam int W = 12;
  localparam int H = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        enable;
  logic [2:0]  centre_weight;
  logic [15:0] s_tdata, m_tdata;
  logic        s_tvalid, s_tready, s_tuser, s_tlast;
  logic        m_tvalid, m_tready, m_tuser, m_tlast, frame_done;

  sobel_edge_filter #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  int checks = 0, failures = 0;

  logic [15:0] img [H][W];
  logic [15:0] expd [H][W];
  bit          gaps, stalls;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic void make_frame(input int kind);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        logic [7:0] y;
        case (kind)
          0: y = 8'($urandom_range(0, 255));
          1: y = (c < W / 2) ? 8'd20 : 8'd230;               // vertical step edge
          default: y = 8'($urandom_range(100, 110));         // faint texture
        endcase
        img[r][c] = {8'($urandom_range(0, 255)), y};
      end
  endfunction

  function automatic void reference(input bit edge_on, input int k);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        if (!edge_on) expd[r][c] = img[r][c];
        else if (r == 0 || c == 0 || r == H - 1 || c == W - 1) expd[r][c] = 16'h8000;
        else begin
          int gx, gy, e;
          gx = (int'(img[r-1][c+1][7:0]) + k * int'(img[r][c+1][7:0]) + int'(img[r+1][c+1][7:0]))
             - (int'(img[r-1][c-1][7:0]) + k * int'(img[r][c-1][7:0]) + int'(img[r+1][c-1][7:0]));
          gy = (int'(img[r+1][c-1][7:0]) + k * int'(img[r+1][c][7:0]) + int'(img[r+1][c+1][7:0]))
             - (int'(img[r-1][c-1][7:0]) + k * int'(img[r-1][c][7:0]) + int'(img[r-1][c+1][7:0]));
          e = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
          if (e > 255) e = 255;
          expd[r][c] = {8'h80, 8'(e)};
        end
      end
  endfunction

  // Output monitor: collects one frame and compares.
  int out_idx;
  always @(posedge clk) begin
    m_tready <= stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
    if (rst_n && m_tvalid && m_tready) begin
      int r, c;
      r = out_idx / W;
      c = out_idx % W;
      if (out_idx < H * W) begin
        check(m_tdata == expd[r][c],
              $sformatf("pixel (%0d,%0d) got %h want %h", r, c, m_tdata, expd[r][c]));
        check(m_tuser == (out_idx == 0), $sformatf("tuser at %0d", out_idx));
        check(m_tlast == (c == W - 1), $sformatf("tlast at %0d", out_idx));
      end else check(1'b0, "extra output beat");
      out_idx++;
    end
  end

  task automatic send_frame(input int junk);
    for (int j = 0; j < junk; j++) begin
      s_tdata <= 16'hDEAD; s_tuser <= 1'b0; s_tlast <= 1'b0; s_tvalid <= 1'b1;
      @(posedge clk); while (!s_tready) @(posedge clk);
    end
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
  endtask

  // frame_done is sampled one edge after the filter raised it.
  int done_count = 0;
  longint t_done;
  always @(posedge clk) if (frame_done) begin
    done_count++;
    t_done = $time / 10;
  end

  task automatic run_frame(input int kind, input bit edge_on, input int k, input int junk,
                           input bit change_mid);
    longint t0;
    int done0;
    make_frame(kind);
    reference(edge_on, k);
    enable        <= edge_on;
    centre_weight <= 3'(k);
    out_idx = 0;
    done0 = done_count;
    t0 = $time / 10;
    fork
      send_frame(junk);
      begin
        if (change_mid) begin
          repeat (W * 2) @(posedge clk);
          enable        <= !edge_on;   // must not affect this frame
          centre_weight <= 3'd7;
        end
      end
    join
    while (out_idx < H * W) @(posedge clk);
    repeat (3) @(posedge clk);
    check(done_count == done0 + 1, "one frame_done per frame");
    if (!gaps && !stalls && junk == 0)
      // first pixel taken one edge after t0, one raster position per edge,
      // frame_done registered at the last position and seen one edge later
      check(t_done - t0 == longint'(int'((H + 1) * (W + 1) + 1)),
            $sformatf("frame took %0d cycles, want %0d", t_done - t0, (H + 1) * (W + 1) + 1));
  endtask

  initial begin
    s_tvalid = 0; s_tdata = 0; s_tuser = 0; s_tlast = 0;
    enable = 1; centre_weight = 2; gaps = 0; stalls = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_frame(0, 1'b1, 2, 0, 1'b0);   // timed, no gaps
    run_frame(1, 1'b1, 2, 0, 1'b0);   // step edge
    gaps = 1; stalls = 1;
    run_frame(0, 1'b1, 1, 0, 1'b0);
    run_frame(2, 1'b1, 5, 0, 1'b0);
    run_frame(0, 1'b0, 2, 3, 1'b0);   // pass-through, junk before frame
    run_frame(0, 1'b1, 2, 0, 1'b1);   // mode change requested mid-frame
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
