// tb_ttn_top_full: one complete operation of the classifier at its default
// configuration (8 features, maximum bond dimension 4, 16-bit Q2.14, full
// parallel nodes): load all weights over AXI4-Lite, stream 64 samples back
// to back, and compare every result with the reference model. With no
// stalls the build must take one sample per cycle, and the first result
// must come 1 + ttn_pkg::tree_latency cycles after its sample.
module tb_ttn_top_full;
  import ttn_pkg::*;
  import ttn_ref_pkg::*;
  localparam int N = 8, D = 2, CHI = 4, W = 16, FRAC = 14, DSP_LAT = 3, FMB = 10, AW = 16;
  localparam int NW = total_weights(N, D, CHI);
  localparam int LAT = 1 + tree_latency(ARCH_FULL, N, D, CHI, DSP_LAT);
  localparam int NS = 64;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic [31:0] wdata = 0, rdata;
  logic [1:0] bresp, rresp;
  logic awready, wready, bvalid, arready, rvalid;
  logic [N*W-1:0] sd;
  logic sv = 0, sr, mv;
  logic [W-1:0] md;
  int checks = 0, failures = 0, cyc = 0, nout = 0, t_in0 = 0, t_out0 = 0, t_outl = 0;
  longint wts [];
  logic [N*W-1:0] smp [NS];
  longint exp_s [NS];

  ttn_top dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(4'hf), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .s_axis_tdata(sd), .s_axis_tvalid(sv), .s_axis_tready(sr),
    .m_axis_tdata(md), .m_axis_tvalid(mv), .m_axis_tready(1'b1));

  always #2 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && mv) begin
      checks++;
      if (nout == 0) t_out0 = cyc;
      t_outl = cyc;
      if (longint'($signed(md)) != exp_s[nout]) begin
        failures++; $display("sample %0d: %0d exp %0d", nout, $signed(md), exp_s[nout]);
      end
      nout++;
    end
  end

  initial begin
    longint ph [];
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
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int q = 0; q < NW; q++) begin
      awaddr = AW'(4 * q); wdata = 32'(wts[q]); awvalid = 1; wvalid = 1;
      do @(posedge clk); while (!awready);
      #1 awvalid = 0; wvalid = 0;
      @(posedge clk);
      #1;
    end
    for (int s = 0; s < NS; s++) begin
      sv = 1; sd = smp[s];
      @(posedge clk);
      if (s == 0) t_in0 = cyc;
      checks++;
      if (!sr) begin failures++; $display("input stalled"); end
      #1;
    end
    sv = 0;
    repeat (LAT + 10) @(posedge clk);
    #1;
    checks += 3;
    if (nout != NS) begin failures++; $display("%0d results of %0d", nout, NS); end
    if (t_out0 - t_in0 != LAT) begin failures++; $display("latency %0d exp %0d", t_out0 - t_in0, LAT); end
    if (t_outl - t_out0 != NS - 1) begin failures++; $display("results not back to back"); end
    $display("latency %0d cycles (%0d ns at 250 MHz), %0d samples in %0d cycles",
             t_out0 - t_in0, 4 * (t_out0 - t_in0), NS, t_outl - t_in0 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
