// tb_accel_ctrl_regs -- self-checking test of the AXI4-Lite register block.
//
// Checks the reset values (filter off, centre weight 2), that CTRL writes
// reach the edge_enable and centre_weight outputs and read back, that a write
// with byte 0 disabled and writes to read-only registers change nothing, that
// the frame counters count frame_done pulses, that GEOMETRY reports the frame
// size, and that responses are held while the master delays BREADY/RREADY.
module tb_accel_ctrl_regs;
  import cdpf_pkg::*;

  localparam int W = 1280;
  localparam int H = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  s_axil_awaddr, s_axil_araddr, s_axil_wstrb;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready;
  logic        edge_enable;
  logic [2:0]  centre_weight;
  logic        edge_frame_done, rgb_frame_done;

  accel_ctrl_regs #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic axil_write(input logic [3:0] a, input logic [31:0] d, input logic [3:0] strb,
                            input int bdelay);
    s_axil_awaddr <= a; s_axil_wdata <= d; s_axil_wstrb <= strb;
    s_axil_awvalid <= 1'b1; s_axil_wvalid <= 1'b1;
    @(posedge clk);
    while (!(s_axil_awready && s_axil_wready)) @(posedge clk);
    s_axil_awvalid <= 1'b0; s_axil_wvalid <= 1'b0;
    @(posedge clk);
    repeat (bdelay) begin
      check(s_axil_bvalid, "write response held");
      @(posedge clk);
    end
    s_axil_bready <= 1'b1;
    @(posedge clk);
    while (!s_axil_bvalid) @(posedge clk);
    check(s_axil_bresp == 2'b00, "write response OKAY");
    s_axil_bready <= 1'b0;
    @(posedge clk);
  endtask

  task automatic axil_read(input logic [3:0] a, output logic [31:0] d, input int rdelay);
    s_axil_araddr <= a; s_axil_arvalid <= 1'b1;
    @(posedge clk);
    while (!s_axil_arready) @(posedge clk);
    s_axil_arvalid <= 1'b0;
    @(posedge clk);
    repeat (rdelay) begin
      check(s_axil_rvalid, "read response held");
      @(posedge clk);
    end
    s_axil_rready <= 1'b1;
    @(posedge clk);
    while (!s_axil_rvalid) @(posedge clk);
    d = s_axil_rdata;
    s_axil_rready <= 1'b0;
    @(posedge clk);
  endtask

  task automatic pulse(input bit which_rgb, input int n);
    repeat (n) begin
      if (which_rgb) rgb_frame_done <= 1'b1; else edge_frame_done <= 1'b1;
      @(posedge clk);
      rgb_frame_done <= 1'b0; edge_frame_done <= 1'b0;
      @(posedge clk);
    end
  endtask

  logic [31:0] d;
  initial begin
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0;
    s_axil_bready = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    edge_frame_done = 0; rgb_frame_done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    check(edge_enable == 1'b0 && centre_weight == 3'd2, "reset: filter off, K = 2");
    axil_read(REG_CTRL, d, 0);
    check(d == 32'h0000_0020, $sformatf("CTRL reset read %h", d));

    axil_write(REG_CTRL, 32'h0000_0051, 4'hF, 3);
    check(edge_enable == 1'b1 && centre_weight == 3'd5, "CTRL write: on, K = 5");
    axil_read(REG_CTRL, d, 2);
    check(d == 32'h0000_0051, $sformatf("CTRL read back %h", d));

    axil_write(REG_CTRL, 32'h0000_0010, 4'hE, 0);   // byte 0 not enabled
    check(edge_enable == 1'b1 && centre_weight == 3'd5, "WSTRB byte 0 off ignored");

    axil_write(REG_CTRL, 32'hFFFF_FF10, 4'hF, 0);
    check(edge_enable == 1'b0 && centre_weight == 3'd1, "CTRL write: off, K = 1");

    pulse(1'b0, 3);
    pulse(1'b1, 5);
    axil_read(REG_EDGE_FRAMES, d, 1);
    check(d == 32'd3, $sformatf("EDGE_FRAMES %0d", d));
    axil_read(REG_RGB_FRAMES, d, 0);
    check(d == 32'd5, $sformatf("RGB_FRAMES %0d", d));

    axil_write(REG_EDGE_FRAMES, 32'd99, 4'hF, 0);    // read only
    axil_read(REG_EDGE_FRAMES, d, 0);
    check(d == 32'd3, "EDGE_FRAMES is read only");

    axil_read(REG_GEOMETRY, d, 0);
    check(d == {16'(H), 16'(W)}, $sformatf("GEOMETRY %h", d));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
