// cdpf_pl_accel -- programmable-logic part of the crack-detection system.
//
// What it does: the crack detector runs a particle filter in software on the
// processor. Its two most expensive image passes are moved into logic: the
// Sobel edge filter, which makes the edge map the particle likelihood uses,
// and the YUY2-to-RGB converter, which makes the colour image the likelihood
// compares with the target crack colour. This top places the two accelerators
// side by side on the processor bus, as the document does, with a small
// AXI4-Lite register block for their control and status.
//
// How it works: each accelerator has its own stream pair, fed and drained by
// the processor's stream DMA (not part of this design): the edge filter takes
// a YUY2 frame and returns the edge map as YUY2 (Y = edge strength, chroma
// 0x80, or the untouched frame when the filter is off); the converter takes a
// YUY2 frame and returns 24-bit RGB. Both run independently and can work on
// the same frame at the same time. Their frame-done pulses count up the
// status registers.
//
// Interface: stream ports are AXI4-Stream style (tdata, tvalid, tready,
// tuser = start of frame, tlast = end of line); the register port is AXI4-Lite
// (see accel_ctrl_regs for the map). One clock, active-low asynchronous reset.
//
// Timing: each accelerator sustains one pixel per clock. A 1280 x 1024 frame
// takes 1,313,025 cycles in the edge filter (one padding column per line and
// one padding line per frame) and 1,310,720 cycles in the converter, plus a
// pipeline latency of a few cycles.
module cdpf_pl_accel
  import cdpf_pkg::*;
#(
  parameter int unsigned WIDTH  = IMG_WIDTH,
  parameter int unsigned HEIGHT = IMG_HEIGHT
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite control port
  input  logic [3:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [3:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // edge filter: YUY2 frame in
  input  logic [15:0] edge_s_tdata,
  input  logic        edge_s_tvalid,
  output logic        edge_s_tready,
  input  logic        edge_s_tuser,
  input  logic        edge_s_tlast,
  // edge filter: edge map out
  output logic [15:0] edge_m_tdata,
  output logic        edge_m_tvalid,
  input  logic        edge_m_tready,
  output logic        edge_m_tuser,
  output logic        edge_m_tlast,
  // colour converter: YUY2 frame in
  input  logic [15:0] rgb_s_tdata,
  input  logic        rgb_s_tvalid,
  output logic        rgb_s_tready,
  input  logic        rgb_s_tuser,
  input  logic        rgb_s_tlast,
  // colour converter: RGB frame out
  output logic [23:0] rgb_m_tdata,
  output logic        rgb_m_tvalid,
  input  logic        rgb_m_tready,
  output logic        rgb_m_tuser,
  output logic        rgb_m_tlast
);

  logic       edge_enable;
  logic [2:0] centre_weight;
  logic       edge_frame_done, rgb_frame_done;

  accel_ctrl_regs #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .edge_enable, .centre_weight,
    .edge_frame_done, .rgb_frame_done
  );

  sobel_edge_filter #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_sobel (
    .clk, .rst_n,
    .enable        (edge_enable),
    .centre_weight (centre_weight),
    .s_tdata  (edge_s_tdata),  .s_tvalid (edge_s_tvalid), .s_tready (edge_s_tready),
    .s_tuser  (edge_s_tuser),  .s_tlast  (edge_s_tlast),
    .m_tdata  (edge_m_tdata),  .m_tvalid (edge_m_tvalid), .m_tready (edge_m_tready),
    .m_tuser  (edge_m_tuser),  .m_tlast  (edge_m_tlast),
    .frame_done (edge_frame_done)
  );

  yuy2_to_rgb #(.HEIGHT(HEIGHT)) u_rgb (
    .clk, .rst_n,
    .s_tdata  (rgb_s_tdata),  .s_tvalid (rgb_s_tvalid), .s_tready (rgb_s_tready),
    .s_tuser  (rgb_s_tuser),  .s_tlast  (rgb_s_tlast),
    .m_tdata  (rgb_m_tdata),  .m_tvalid (rgb_m_tvalid), .m_tready (rgb_m_tready),
    .m_tuser  (rgb_m_tuser),  .m_tlast  (rgb_m_tlast),
    .frame_done (rgb_frame_done)
  );

endmodule
