// pr_region_top: the reconfigurable region of the object-detection
// accelerator, with its four accelerator modules.
//
// The whole fabric is one reconfigurable region. At run time the processor
// loads one of four partial configurations into it: the GCN
// fully-connected-layer module or one of three Conv2d modules that differ in
// tiling (T_OD x T_ID = 8x16, 32x4 and 3x64, the sizes of the original
// design; the third, for the detection head, has no SiLU). Only one module exists at a time; the
// processor time-multiplexes them over the layers of the model, and streams
// input tiles, weights and biases in and results out by DMA.
//
// In this RTL all four modules are instantiated side by side and the region
// logic decides which one is "present": while reconfig is high (the
// configuration port is writing a partial bitstream) the region is isolated
// (ld_ready, busy, done low) and every module is held in reset. When reconfig
// falls, the module named by rm_sel becomes the loaded one (rm_loaded,
// rm_valid); the others stay in reset, and load, command and read traffic is
// steered to the loaded module only. Buffer contents are not kept across a
// reconfiguration: the processor reloads them. The isolation and hand-over
// behaviour is this design's own; reconfiguration itself (about 10 ms for a
// 4 MB configuration) is done by the device's configuration port, outside
// this logic.
//
// Ports: the load port, command handshake and read port have the meaning
// described in conv_accel and gcn_accel; rd_data follows rd_addr by one
// cycle.
module pr_region_top
  import fxp_pkg::*;
#(
  parameter int GCN_T_ROW = 64,
  parameter int GCN_T_COL = 64,
  parameter int GCN_T_DEP = 64,
  parameter int C1_T_OD = 8,
  parameter int C1_T_ID = 16,
  parameter int C1_T_OR = 64,
  parameter int C1_T_IR = 64,
  parameter int C2_T_OD = 32,
  parameter int C2_T_ID = 4,
  parameter int C2_T_OR = 32,
  parameter int C2_T_IR = 64,
  parameter int C3_T_OD = 3,
  parameter int C3_T_ID = 64,
  parameter int C3_T_OR = 64,
  parameter int C3_T_IR = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration port status
  input  logic              reconfig,
  input  rm_e               rm_sel,
  output rm_e               rm_loaded,
  output logic              rm_valid,
  // load port (DMA into the tile buffers)
  input  logic              ld_valid,
  output logic              ld_ready,
  input  buf_e              ld_buf,
  input  logic [ADDR_W-1:0] ld_addr,
  input  fxp_t              ld_data,
  // command
  input  logic              start,
  input  tile_cmd_t         cmd,
  output logic              busy,
  output logic              done,
  // result read port (DMA out of the output buffer)
  input  logic [ADDR_W-1:0] rd_addr,
  output fxp_t              rd_data
);

  localparam int NRM = 4;

  logic       reconfig_q;
  rm_e        rm_pending;
  logic [NRM-1:0] rm_rst_n;   // per-module reset: low unless loaded

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reconfig_q <= 1'b0;
      rm_pending <= RM_GCN;
      rm_loaded  <= RM_GCN;
      rm_valid   <= 1'b0;
      rm_rst_n   <= '0;
    end else begin
      reconfig_q <= reconfig;
      if (reconfig) begin
        rm_pending <= rm_sel;
        rm_valid   <= 1'b0;
      end else if (reconfig_q) begin
        rm_loaded <= rm_pending;
        rm_valid  <= 1'b1;
      end
      for (int i = 0; i < NRM; i++)
        rm_rst_n[i] <= rm_valid && !reconfig && (rm_loaded == rm_e'(i));
    end
  end

  // Traffic is steered to the loaded module only once it is out of reset.
  logic [NRM-1:0] sel;
  logic [NRM-1:0] m_ld_ready, m_busy, m_done;
  fxp_t           m_rd_data [NRM];

  always_comb begin
    for (int i = 0; i < NRM; i++) sel[i] = rm_rst_n[i] && !reconfig;
  end

  gcn_accel #(.T_ROW(GCN_T_ROW), .T_COL(GCN_T_COL), .T_DEP(GCN_T_DEP)) u_gcn (
    .clk, .rst_n(rm_rst_n[RM_GCN]),
    .ld_valid(ld_valid && sel[RM_GCN]), .ld_ready(m_ld_ready[RM_GCN]),
    .ld_buf, .ld_addr, .ld_data,
    .start(start && sel[RM_GCN]), .cmd, .busy(m_busy[RM_GCN]), .done(m_done[RM_GCN]),
    .rd_addr, .rd_data(m_rd_data[RM_GCN])
  );

  conv_accel #(.T_OD(C1_T_OD), .T_ID(C1_T_ID), .T_OR(C1_T_OR), .T_OC(C1_T_OR),
               .T_IR(C1_T_IR), .T_IC(C1_T_IR), .K_MAX(3), .SILU_EN(1'b1)) u_conv1 (
    .clk, .rst_n(rm_rst_n[RM_CONV1]),
    .ld_valid(ld_valid && sel[RM_CONV1]), .ld_ready(m_ld_ready[RM_CONV1]),
    .ld_buf, .ld_addr, .ld_data,
    .start(start && sel[RM_CONV1]), .cmd, .busy(m_busy[RM_CONV1]), .done(m_done[RM_CONV1]),
    .rd_addr, .rd_data(m_rd_data[RM_CONV1])
  );

  conv_accel #(.T_OD(C2_T_OD), .T_ID(C2_T_ID), .T_OR(C2_T_OR), .T_OC(C2_T_OR),
               .T_IR(C2_T_IR), .T_IC(C2_T_IR), .K_MAX(3), .SILU_EN(1'b1)) u_conv2 (
    .clk, .rst_n(rm_rst_n[RM_CONV2]),
    .ld_valid(ld_valid && sel[RM_CONV2]), .ld_ready(m_ld_ready[RM_CONV2]),
    .ld_buf, .ld_addr, .ld_data,
    .start(start && sel[RM_CONV2]), .cmd, .busy(m_busy[RM_CONV2]), .done(m_done[RM_CONV2]),
    .rd_addr, .rd_data(m_rd_data[RM_CONV2])
  );

  conv_accel #(.T_OD(C3_T_OD), .T_ID(C3_T_ID), .T_OR(C3_T_OR), .T_OC(C3_T_OR),
               .T_IR(C3_T_IR), .T_IC(C3_T_IR), .K_MAX(3), .SILU_EN(1'b0)) u_conv3 (
    .clk, .rst_n(rm_rst_n[RM_CONV3]),
    .ld_valid(ld_valid && sel[RM_CONV3]), .ld_ready(m_ld_ready[RM_CONV3]),
    .ld_buf, .ld_addr, .ld_data,
    .start(start && sel[RM_CONV3]), .cmd, .busy(m_busy[RM_CONV3]), .done(m_done[RM_CONV3]),
    .rd_addr, .rd_data(m_rd_data[RM_CONV3])
  );

  // Output mux; the region is isolated while not loaded or reconfiguring.
  wire live = rm_valid && !reconfig && rm_rst_n[rm_loaded];
  assign ld_ready = live && m_ld_ready[rm_loaded];
  assign busy     = live && m_busy[rm_loaded];
  assign done     = live && m_done[rm_loaded];
  assign rd_data  = m_rd_data[rm_loaded];

  a_no_traffic_while_reconfig: assert property (@(posedge clk) disable iff (!rst_n)
      reconfig |-> !start && !ld_valid)
    else $error("pr_region_top: traffic while the region is being reconfigured");

endmodule
