// ttn_top: tree tensor network binary classifier for low-latency inference.
//
// A host loads the trained network weights through an AXI4-Lite slave
// (axil_weight_regs) and streams samples in over AXI4-Stream. Each input beat
// carries one sample of N raw features, feature n in bits [n*W +: W]
// (Q(W-FRAC).FRAC, expected in [0, 1]). Every feature goes through the local
// feature map phi(x) = [sin(pi x/2), cos(pi x/2)] (feature_map, one register
// stage) and the resulting N vectors are contracted by the tree (ttn_tree).
// The scalar decision value leaves on the output AXI4-Stream, one W-bit beat
// per sample; the host turns it into a class probability.
//
// ARCH selects full-parallel nodes (one sample per cycle, fewest cycles) or
// partial-parallel nodes (far fewer multipliers, a sample every few tens of
// cycles); s_axis_tready tells the host when the next sample is taken.
// Latency from the accepted input beat to the output beat is
// 1 + ttn_pkg::tree_latency cycles. The network shape (N, D, CHI) and the
// number format are fixed at elaboration; only the weights are loadable.
// Stream framing (one sample per beat, no TLAST) and the address map are this
// design's choices; the PCIe/DMA link to the host is outside this RTL.
module ttn_top
  import ttn_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned D       = 2,
  parameter int unsigned CHI     = 4,
  parameter int unsigned W       = 16,
  parameter int unsigned FRAC    = 14,
  parameter int unsigned DSP_LAT = 3,
  parameter int unsigned FM_BITS = 10,
  parameter arch_e       ARCH    = ARCH_FULL,
  parameter int unsigned ADDR_W  = 16,
  localparam int unsigned NW     = total_weights(N, D, CHI)
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite weight port
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // AXI4-Stream sample input
  input  logic [N*W-1:0]    s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  // AXI4-Stream result output
  output logic [W-1:0]      m_axis_tdata,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready
);

  logic signed [W-1:0] weights [NW];
  logic signed [W-1:0] phi [N][D];
  logic                fm_valid, fm_adv, tree_ready, out_valid;
  logic signed [W-1:0] out_value;

  axil_weight_regs #(.NW(NW), .W(W), .ADDR_W(ADDR_W)) u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .weights
  );

  // Feature-map stage: one register, advanced when the tree takes its data.
  assign fm_adv        = !fm_valid || tree_ready;
  assign s_axis_tready = fm_adv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      fm_valid <= 1'b0;
    else if (fm_adv) fm_valid <= s_axis_tvalid;
  end

  for (genvar n = 0; n < N; n++) begin : g_fm
    feature_map #(.W(W), .FRAC(FRAC), .ABITS(FM_BITS)) u_fm (
      .clk, .en(fm_adv), .x(s_axis_tdata[n*W +: W]),
      .phi_sin(phi[n][0]), .phi_cos(phi[n][1])
    );
    // D = 2 is the dimension of this feature map.
    for (genvar d = 2; d < D; d++) begin : g_pad
      assign phi[n][d] = '0;
    end
  end

  ttn_tree #(
    .N(N), .D(D), .CHI(CHI), .W(W), .FRAC(FRAC), .DSP_LAT(DSP_LAT), .ARCH(ARCH)
  ) u_tree (
    .clk, .rst_n, .in_valid(fm_valid), .in_ready(tree_ready), .phi, .weights,
    .out_valid, .out_ready(m_axis_tready), .out_value
  );

  assign m_axis_tdata  = out_value;
  assign m_axis_tvalid = out_valid;

endmodule
