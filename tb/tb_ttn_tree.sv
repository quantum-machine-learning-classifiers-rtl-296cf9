// tb_ttn_tree: contracts random feature vectors with an N=8, CHI=4 network in
// both node styles. The full-parallel tree gets one sample per cycle with
// random gaps and output stalls; the partial-parallel tree gets samples
// through valid/ready with random back-pressure. Every result is compared
// with the reference tree contraction, and the latency of the first sample
// must equal ttn_pkg::tree_latency for each style.
module tb_ttn_tree;
  import ttn_pkg::*;
  import ttn_ref_pkg::*;
  localparam int N = 8, D = 2, CHI = 4, W = 16, FRAC = 14, DSP_LAT = 3;
  localparam int NW = total_weights(N, D, CHI);
  localparam int LAT_FP = tree_latency(ARCH_FULL, N, D, CHI, DSP_LAT);
  localparam int LAT_PP = tree_latency(ARCH_PARTIAL, N, D, CHI, DSP_LAT);
  localparam int NS = 300;

  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] weights [NW];
  logic signed [W-1:0] phi_f [N][D], phi_p [N][D];
  logic iv_f = 0, ir_f, ov_f, or_f = 1;
  logic iv_p = 0, ir_p, ov_p, or_p = 1;
  logic signed [W-1:0] out_f, out_p;
  longint wts [];
  longint exp_s [NS];
  logic signed [W-1:0] smp [NS][N][D];
  int checks = 0, failures = 0, cyc = 0;
  int nf_out = 0, np_out = 0, f_stall = 0, p_bp = 0, p_wait = 0;
  int tf0 = -1, tp0 = -1, tf1 = -1, tp1 = -1;

  ttn_tree #(.N(N), .D(D), .CHI(CHI), .W(W), .FRAC(FRAC), .DSP_LAT(DSP_LAT),
             .ARCH(ARCH_FULL)) u_fp (
    .clk, .rst_n, .in_valid(iv_f), .in_ready(ir_f), .phi(phi_f), .weights,
    .out_valid(ov_f), .out_ready(or_f), .out_value(out_f));
  ttn_tree #(.N(N), .D(D), .CHI(CHI), .W(W), .FRAC(FRAC), .DSP_LAT(DSP_LAT),
             .ARCH(ARCH_PARTIAL)) u_pp (
    .clk, .rst_n, .in_valid(iv_p), .in_ready(ir_p), .phi(phi_p), .weights,
    .out_valid(ov_p), .out_ready(or_p), .out_value(out_p));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitors.
  always @(posedge clk) begin
    if (rst_n && ov_f && tf1 < 0) tf1 = cyc;
    if (rst_n && ov_f && or_f) begin
      checks++;
      if (longint'(out_f) != exp_s[nf_out]) begin
        failures++; $display("FP sample %0d: %0d exp %0d", nf_out, out_f, exp_s[nf_out]);
      end
      nf_out++;
    end
    if (rst_n && ov_f && !or_f) f_stall++;
    if (rst_n && ov_p && tp1 < 0) tp1 = cyc;
    if (rst_n && ov_p && or_p) begin
      checks++;
      if (longint'(out_p) != exp_s[np_out]) begin
        failures++; $display("PP sample %0d: %0d exp %0d", np_out, out_p, exp_s[np_out]);
      end
      np_out++;
    end
    if (rst_n && ov_p && !or_p) p_bp++;
  end

  initial begin
    longint ph [];
    wts = new[NW];
    for (int q = 0; q < NW; q++) begin
      wts[q] = longint'($urandom % 16384) - 8192;
      weights[q] = W'(wts[q]);
    end
    ph = new[N * D];
    for (int s = 0; s < NS; s++) begin
      for (int n = 0; n < N; n++)
        for (int c = 0; c < D; c++) begin
          smp[s][n][c] = W'($urandom % 16385);
          ph[n * D + c] = smp[s][n][c];
        end
      exp_s[s] = tree_eval(N, D, CHI, ph, wts, W, FRAC);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      // full parallel driver
      begin
        int s;
        s = 0;
        while (s < NS) begin
          iv_f = (s < 2) || (($urandom % 4) != 0);
          or_f = (s < 20) || (($urandom % 5) != 0);
          phi_f = smp[s];
          @(posedge clk);
          if (iv_f && ir_f) begin
            if (s == 0) tf0 = cyc;
            s++;
          end
          #1;
        end
        iv_f = 0; or_f = 1;
      end
      // partial parallel driver
      begin
        int s;
        s = 0;
        while (s < NS) begin
          iv_p = 1;
          or_p = (s < 3) || (($urandom % 3) != 0);
          phi_p = smp[s];
          @(posedge clk);
          if (ir_p) begin
            if (s == 0) tp0 = cyc;
            s++;
          end else p_wait++;
          #1;
          iv_p = 0;
          if ($urandom % 2) begin @(posedge clk); #1; end
        end
        or_p = 1;
      end
    join
    repeat (LAT_PP * 2 + 20) @(posedge clk);
    #1;
    checks += 2;
    if (nf_out != NS) begin failures++; $display("FP produced %0d of %0d", nf_out, NS); end
    if (np_out != NS) begin failures++; $display("PP produced %0d of %0d", np_out, NS); end
    checks += 2;
    if (tf1 - tf0 != LAT_FP) begin failures++; $display("FP latency %0d exp %0d", tf1 - tf0, LAT_FP); end
    if (tp1 - tp0 != LAT_PP) begin failures++; $display("PP latency %0d exp %0d", tp1 - tp0, LAT_PP); end
    checks++;
    if (f_stall == 0 || p_bp == 0 || p_wait == 0) begin
      failures++; $display("stall not exercised: %0d %0d %0d", f_stall, p_bp, p_wait);
    end
    $display("latency FP=%0d PP=%0d; fp_stalls=%0d pp_backpressure=%0d pp_input_waits=%0d",
             tf1 - tf0, tp1 - tp0, f_stall, p_bp, p_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
