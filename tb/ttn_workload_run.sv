// ttn_workload_run: testbench helper that builds the classifier for one
// network shape (N features, node style ARCH), loads random weights over
// AXI4-Lite, streams NS random samples with random output back-pressure and
// compares each result with the reference model. It also checks the latency
// of the first sample and reports its counts when `done` rises.
module ttn_workload_run
  import ttn_pkg::*;
  import ttn_ref_pkg::*;
#(
  parameter int    N    = 4,
  parameter int    CHI  = 4,
  parameter arch_e ARCH = ARCH_FULL,
  parameter int    NS   = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int D = 2, W = 16, FRAC = 14, DSP_LAT = 3, FMB = 10, AW = 16;
  localparam int NW = total_weights(N, D, CHI);
  localparam int LAT = 1 + tree_latency(ARCH, N, D, CHI, DSP_LAT);

  logic [AW-1:0] awaddr = 0;
  logic awvalid = 0, wvalid = 0;
  logic [31:0] wdata = 0, rdata;
  logic [1:0] bresp, rresp;
  logic awready, wready, bvalid, arready, rvalid;
  logic [N*W-1:0] sd;
  logic sv = 0, sr, mv, mr = 1;
  logic [W-1:0] md;
  int cyc = 0, nout = 0, t_in0 = 0, t_out0 = 0;
  longint wts [];
  logic [N*W-1:0] smp [NS];
  longint exp_s [NS];

  ttn_top #(.N(N), .CHI(CHI), .ARCH(ARCH)) dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(4'hf), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(1'b1), .s_axil_araddr('0), .s_axil_arvalid(1'b0),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(1'b1),
    .s_axis_tdata(sd), .s_axis_tvalid(sv), .s_axis_tready(sr),
    .m_axis_tdata(md), .m_axis_tvalid(mv), .m_axis_tready(mr));

  always @(posedge clk) cyc <= cyc + 1;

  logic seen = 0;
  always @(posedge clk) begin
    if (rst_n && mv && !seen) begin
      seen <= 1;
      t_out0 = cyc;
    end
    if (rst_n && mv && mr) begin
      checks++;
      if (longint'($signed(md)) != exp_s[nout]) begin
        failures++;
        $display("N=%0d arch=%0d sample %0d: %0d exp %0d", N, ARCH, nout, $signed(md), exp_s[nout]);
      end
      nout++;
    end
  end

  initial begin
    longint ph [];
    done = 0; checks = 0; failures = 0;
    wts = new[NW];
    ph = new[N * D];
    for (int q = 0; q < NW; q++) wts[q] = longint'($urandom % 16384) - 8192;
    for (int s = 0; s < NS; s++) begin
      for (int n = 0; n < N; n++) begin
        int a;
        smp[s][n*W +: W] = W'($urandom % 16385);
        a = fm_addr(longint'(smp[s][n*W +: W]), FRAC, FMB);
        ph[n * D]     = fm_sin(a, FRAC, FMB);
        ph[n * D + 1] = fm_sin((1 << FMB) - a, FRAC, FMB);
      end
      exp_s[s] = tree_eval(N, D, CHI, ph, wts, W, FRAC);
    end
    @(posedge rst_n);
    @(posedge clk);
    #1;
    for (int q = 0; q < NW; q++) begin
      awaddr = AW'(4 * q); wdata = 32'(wts[q]); awvalid = 1; wvalid = 1;
      do @(posedge clk); while (!awready);
      #1 awvalid = 0; wvalid = 0;
      @(posedge clk);
      #1;
    end
    for (int s = 0; s < NS; s++) begin
      sv = 1; sd = smp[s];
      mr = (s < 2) || (($urandom % 4) != 0);
      @(posedge clk);
      while (!sr) begin #1; mr = ($urandom % 4) != 0; @(posedge clk); end
      if (s == 0) t_in0 = cyc;
      #1;
    end
    sv = 0; mr = 1;
    repeat (2 * LAT + 10) @(posedge clk);
    #1;
    checks += 2;
    if (nout != NS) begin failures++; $display("N=%0d: %0d results of %0d", N, nout, NS); end
    if (t_out0 - t_in0 != LAT) begin
      failures++; $display("N=%0d latency %0d exp %0d", N, t_out0 - t_in0, LAT);
    end
    $display("N=%0d %s: %0d weights, latency %0d cycles", N,
             (ARCH == ARCH_FULL) ? "full parallel" : "partial parallel", NW, t_out0 - t_in0);
    done = 1;
  end
endmodule
