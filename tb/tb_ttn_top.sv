// tb_ttn_top: end-to-end test of the classifier in both node styles.
// A full-parallel and a partial-parallel build (otherwise at their default
// sizes) share one AXI4-Lite bus: the testbench loads random weights,
// reads some back and provokes an SLVERR. Raw samples (including values
// outside [0, 1], which the feature map clamps) are then streamed into each
// build with random gaps and output back-pressure, and every output beat is
// compared with the reference feature map plus tree contraction. A second
// network with large weights is then loaded so that results saturate.
// Counted mechanisms, each of which must occur: weight writes, read-backs,
// SLVERR, clamped features, saturated results, output stalls and input
// back-pressure in each style. The first sample's latency must be
// 1 + ttn_pkg::tree_latency cycles.
module tb_ttn_top;
  import ttn_pkg::*;
  import ttn_ref_pkg::*;
  localparam int N = 8, D = 2, CHI = 4, W = 16, FRAC = 14, DSP_LAT = 3, FMB = 10, AW = 16;
  localparam int NW = total_weights(N, D, CHI);
  localparam int LAT_FP = 1 + tree_latency(ARCH_FULL, N, D, CHI, DSP_LAT);
  localparam int LAT_PP = 1 + tree_latency(ARCH_PARTIAL, N, D, CHI, DSP_LAT);
  localparam int NS = 200;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0;
  logic [3:0]  wstrb = 0;
  logic awready_f, wready_f, bvalid_f, arready_f, rvalid_f;
  logic awready_p, wready_p, bvalid_p, arready_p, rvalid_p;
  logic [1:0] bresp_f, rresp_f, bresp_p, rresp_p;
  logic [31:0] rdata_f, rdata_p;
  logic [N*W-1:0] sd_f, sd_p;
  logic sv_f = 0, sr_f, mv_f, mr_f = 1;
  logic sv_p = 0, sr_p, mv_p, mr_p = 1;
  logic [W-1:0] md_f, md_p;

  int checks = 0, failures = 0, cyc = 0;
  int n_wr = 0, n_rd = 0, n_err = 0, n_clamp = 0, n_sat = 0;
  int f_stall = 0, p_stall = 0, f_bp = 0, p_bp = 0;
  int nf = 0, np = 0, tf0 = -1, tf1 = -1, tp0 = -1, tp1 = -1;
  longint wts [];
  logic [N*W-1:0] smp [NS];
  longint exp_s [NS];

  ttn_top u_fp (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready_f),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready_f), .s_axil_bresp(bresp_f), .s_axil_bvalid(bvalid_f),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready_f), .s_axil_rdata(rdata_f), .s_axil_rresp(rresp_f),
    .s_axil_rvalid(rvalid_f), .s_axil_rready(rready),
    .s_axis_tdata(sd_f), .s_axis_tvalid(sv_f), .s_axis_tready(sr_f),
    .m_axis_tdata(md_f), .m_axis_tvalid(mv_f), .m_axis_tready(mr_f));

  ttn_top #(.ARCH(ARCH_PARTIAL)) u_pp (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready_p),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready_p), .s_axil_bresp(bresp_p), .s_axil_bvalid(bvalid_p),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready_p), .s_axil_rdata(rdata_p), .s_axil_rresp(rresp_p),
    .s_axil_rvalid(rvalid_p), .s_axil_rready(rready),
    .s_axis_tdata(sd_p), .s_axis_tvalid(sv_p), .s_axis_tready(sr_p),
    .m_axis_tdata(md_p), .m_axis_tvalid(mv_p), .m_axis_tready(mr_p));

  always #2 clk = ~clk;   // 250 MHz
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Both builds share the bus and must answer identically.
  always @(posedge clk) begin
    if (rst_n && ({awready_f, wready_f, bvalid_f, arready_f, rvalid_f, bresp_f, rresp_f} !=
                  {awready_p, wready_p, bvalid_p, arready_p, rvalid_p, bresp_p, rresp_p} ||
                  (rvalid_f && rdata_f != rdata_p))) begin
      failures++; $display("AXI-Lite responses differ");
    end
  end

  task automatic axil_write(input int idx, input logic [31:0] d, output logic [1:0] resp);
    awaddr = AW'(4 * idx); wdata = d; wstrb = 4'hf; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!(awready_f && wready_f));
    #1; awvalid = 0; wvalid = 0; bready = 1;
    do @(posedge clk); while (!bvalid_f);
    resp = bresp_f;
    #1; bready = 0;
  endtask

  task automatic axil_read(input int idx, output logic [31:0] d, output logic [1:0] resp);
    araddr = AW'(4 * idx); arvalid = 1;
    do @(posedge clk); while (!arready_f);
    #1; arvalid = 0; rready = 1;
    do @(posedge clk); while (!rvalid_f);
    d = rdata_f; resp = rresp_f;
    #1; rready = 0;
  endtask

  // Load a network and its expected results.
  task automatic load_network(input int wrange);
    logic [1:0] resp;
    logic [31:0] d;
    longint ph [];
    for (int q = 0; q < NW; q++) begin
      wts[q] = longint'($urandom % (2 * wrange)) - wrange;
      axil_write(q, 32'(wts[q]), resp);
      n_wr++;
      checks++;
      if (resp != 2'b00) begin failures++; $display("write error"); end
    end
    for (int q = 0; q < NW; q += 13) begin
      axil_read(q, d, resp);
      n_rd++;
      checks++;
      if (d != 32'(wts[q]) || resp != 2'b00) begin failures++; $display("read-back %0d", q); end
    end
    ph = new[N * D];
    for (int s = 0; s < NS; s++) begin
      for (int n = 0; n < N; n++) begin
        longint x;
        int a;
        x = (($urandom % 16) == 0) ? longint'($urandom % 8000) - 4000 + ((s % 2) ? 18000 : 0)
                                   : longint'($urandom % 16385);
        if (x < 0 || x > 16384) n_clamp++;
        smp[s][n*W +: W] = W'(x);
        a = fm_addr(x, FRAC, FMB);
        ph[n * D]     = fm_sin(a, FRAC, FMB);
        ph[n * D + 1] = fm_sin((1 << FMB) - a, FRAC, FMB);
      end
      exp_s[s] = tree_eval(N, D, CHI, ph, wts, W, FRAC);
      if (exp_s[s] == 32767 || exp_s[s] == -32768) n_sat++;
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && mv_f && tf1 < 0) tf1 = cyc;
    if (rst_n && mv_f && mr_f) begin
      checks++;
      if (longint'($signed(md_f)) != exp_s[nf]) begin
        failures++; $display("FP %0d: %0d exp %0d", nf, $signed(md_f), exp_s[nf]);
      end
      nf++;
    end
    if (rst_n && mv_f && !mr_f) f_stall++;
    if (rst_n && mv_p && tp1 < 0) tp1 = cyc;
    if (rst_n && mv_p && mr_p) begin
      checks++;
      if (longint'($signed(md_p)) != exp_s[np]) begin
        failures++; $display("PP %0d: %0d exp %0d", np, $signed(md_p), exp_s[np]);
      end
      np++;
    end
    if (rst_n && mv_p && !mr_p) p_stall++;
  end

  task automatic run_stream();
    nf = 0; np = 0; tf1 = -1; tp1 = -1;
    fork
      begin
        int s;
        s = 0;
        while (s < NS) begin
          sv_f = (s == 0) || (($urandom % 4) != 0);
          mr_f = (s < 40) || (($urandom % 4) != 0);
          sd_f = smp[s];
          @(posedge clk);
          if (sv_f && sr_f) begin if (s == 0) tf0 = cyc; s++; end
          else if (sv_f) f_bp++;
          #1;
        end
        sv_f = 0; mr_f = 1;
      end
      begin
        int s;
        s = 0;
        while (s < NS) begin
          sv_p = 1;
          mr_p = (s < 3) || (($urandom % 3) != 0);
          sd_p = smp[s];
          @(posedge clk);
          if (sr_p) begin if (s == 0) tp0 = cyc; s++; end
          else p_bp++;
          #1;
        end
        sv_p = 0; mr_p = 1;
      end
    join
    repeat (3 * LAT_PP + 20) @(posedge clk);
    #1;
    checks += 4;
    if (nf != NS) begin failures++; $display("FP produced %0d", nf); end
    if (np != NS) begin failures++; $display("PP produced %0d", np); end
    if (tf1 - tf0 != LAT_FP) begin failures++; $display("FP latency %0d exp %0d", tf1 - tf0, LAT_FP); end
    if (tp1 - tp0 != LAT_PP) begin failures++; $display("PP latency %0d exp %0d", tp1 - tp0, LAT_PP); end
  endtask

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    wts = new[NW];
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // out-of-range accesses
    axil_write(NW + 3, 32'h1, resp);
    checks++; if (resp == 2'b10) n_err++; else begin failures++; $display("no SLVERR"); end
    axil_read(NW, d, resp);
    checks++; if (resp == 2'b10) n_err++; else begin failures++; $display("no SLVERR"); end
    // network 1: weights in [-0.5, 0.5)
    load_network(8192);
    run_stream();
    $display("network 1: latency FP=%0d PP=%0d cycles", tf1 - tf0, tp1 - tp0);
    // network 2: large weights, so outputs saturate
    load_network(32768);
    run_stream();
    checks++;
    if (n_wr == 0 || n_rd == 0 || n_err == 0 || n_clamp == 0 || n_sat == 0 ||
        f_stall == 0 || p_stall == 0 || f_bp == 0 || p_bp == 0) begin
      failures++; $display("a mechanism was not exercised");
    end
    $display("writes=%0d readbacks=%0d slverr=%0d clamped=%0d saturated=%0d",
             n_wr, n_rd, n_err, n_clamp, n_sat);
    $display("fp_out_stalls=%0d pp_out_stalls=%0d fp_in_backpressure=%0d pp_in_backpressure=%0d",
             f_stall, p_stall, f_bp, p_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
