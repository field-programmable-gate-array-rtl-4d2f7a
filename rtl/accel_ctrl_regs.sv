// accel_ctrl_regs -- AXI4-Lite control and status registers of the accelerators.
//
// What it does: lets the processor, which runs the particle filter in
// software, switch the edge filter between edge-map and pass-through mode
// ("filter on/off"), set the centre weight K of the Sobel operator and read
// how many frames each accelerator has finished. The document places both
// accelerators on the processor's AXI bus and offers a filter on/off control;
// the register map below is this design's own.
//
// Register map (32-bit registers, byte addresses, see cdpf_pkg):
//   0x0 CTRL         [0] edge filter on (reset 0, off), [6:4] centre weight
//                    K (reset 2); other bits read 0
//   0x4 EDGE_FRAMES  frames finished by the edge filter (read only, wraps)
//   0x8 RGB_FRAMES   frames finished by the colour converter (read only)
//   0xC GEOMETRY     [15:0] frame width, [31:16] frame height (read only)
// Writes to read-only registers are ignored and answered OKAY.
//
// How it works and timing: a write is taken when address and data are both
// valid, in one cycle, and answered in the next cycle; the processor must
// take the response before the next write is accepted. A read is taken when
// no read response is pending and answered in the next cycle. WSTRB is
// honoured for byte 0 of CTRL, the only writable byte.
module accel_ctrl_regs
  import cdpf_pkg::*;
#(
  parameter int unsigned WIDTH  = IMG_WIDTH,
  parameter int unsigned HEIGHT = IMG_HEIGHT
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
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
  // to and from the accelerators
  output logic        edge_enable,
  output logic [2:0]  centre_weight,
  input  logic        edge_frame_done,
  input  logic        rgb_frame_done
);

  logic [31:0] edge_frames_q, rgb_frames_q;
  logic        wr_fire, rd_fire;

  assign wr_fire        = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = wr_fire;
  assign s_axil_wready  = wr_fire;
  assign s_axil_bresp   = 2'b00;
  assign rd_fire        = s_axil_arvalid && !s_axil_rvalid;
  assign s_axil_arready = rd_fire;
  assign s_axil_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      edge_enable   <= 1'b0;
      centre_weight <= SOBEL_CENTRE_DEFAULT;
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
      edge_frames_q <= '0;
      rgb_frames_q  <= '0;
    end else begin
      if (edge_frame_done) edge_frames_q <= edge_frames_q + 32'd1;
      if (rgb_frame_done)  rgb_frames_q  <= rgb_frames_q + 32'd1;

      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_fire) begin
        s_axil_bvalid <= 1'b1;
        if (s_axil_awaddr[3:2] == REG_CTRL[3:2] && s_axil_wstrb[0]) begin
          edge_enable   <= s_axil_wdata[0];
          centre_weight <= s_axil_wdata[6:4];
        end
      end

      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (rd_fire) begin
        s_axil_rvalid <= 1'b1;
        unique case (s_axil_araddr[3:2])
          REG_CTRL[3:2]:        s_axil_rdata <= {25'd0, centre_weight, 3'd0, edge_enable};
          REG_EDGE_FRAMES[3:2]: s_axil_rdata <= edge_frames_q;
          REG_RGB_FRAMES[3:2]:  s_axil_rdata <= rgb_frames_q;
          default:              s_axil_rdata <= {16'(HEIGHT), 16'(WIDTH)};
        endcase
      end
    end
  end

  // AXI rule: a response stays valid until it is taken.
  a_bhold : assert property (@(posedge clk) disable iff (!rst_n)
                             s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_rhold : assert property (@(posedge clk) disable iff (!rst_n)
                             s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));

  logic unused;
  assign unused = ^{s_axil_awaddr[1:0], s_axil_araddr[1:0], s_axil_wdata[31:7],
                    s_axil_wdata[3:1], s_axil_wstrb[3:1]};

endmodule
