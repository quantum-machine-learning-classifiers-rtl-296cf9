// tb_tc_full_parallel: streams random vector pairs (full 16-bit range, so
// both saturation points are hit) into a DIN=4, DOUT=4 full-parallel node
// with random gaps and random enable stalls. Every result is compared with
// the reference contraction and must appear exactly
// ttn_pkg::fp_node_latency enabled cycles after its input.
module tb_tc_full_parallel;
  import ttn_pkg::*;
  import ttn_ref_pkg::*;
  localparam int DIN = 4, DOUT = 4, W = 16, FRAC = 14, DSP_LAT = 3;
  localparam int LAT = fp_node_latency(DIN, DSP_LAT);

  logic clk = 0, rst_n = 0, en = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] x [DIN], y [DIN], v [DOUT][DIN][DIN], z [DOUT];
  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_stall = 0, n_sat = 0;
  longint vflat [];
  longint exp_q [$][];
  int     stamp_q [$];
  int     ecnt = 0;

  tc_full_parallel #(.DIN(DIN), .DOUT(DOUT), .W(W), .FRAC(FRAC), .DSP_LAT(DSP_LAT))
    dut (.clk, .rst_n, .en, .in_valid, .x, .y, .v, .out_valid, .z);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xa[], ya[], ze[];
    vflat = new[DOUT * DIN * DIN];
    for (int q = 0; q < DOUT * DIN * DIN; q++) begin
      vflat[q] = (q < 4) ? 32767 : longint'(W'($urandom) >>> ($urandom % 3)) ;
      vflat[q] = longint'($signed(W'(vflat[q])));
      v[q / (DIN * DIN)][(q / DIN) % DIN][q % DIN] = W'(vflat[q]);
    end
    xa = new[DIN]; ya = new[DIN];
    for (int j = 0; j < DIN; j++) begin x[j] = 0; y[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int t = 0; t < 1500; t++) begin
      in_valid = ($urandom % 10) < 7;
      en       = (t < 200) ? 1'b1 : (($urandom % 10) < 8);
      for (int j = 0; j < DIN; j++) begin
        x[j] = (t % 50 == 7) ? 16'sh7fff : W'($urandom);
        y[j] = (t % 50 == 7) ? 16'sh7fff : W'($urandom);
        xa[j] = x[j]; ya[j] = y[j];
      end
      if (in_valid && en) begin
        contract(DIN, DOUT, xa, ya, vflat, W, FRAC, ze);
        exp_q.push_back(ze);
        stamp_q.push_back(ecnt);
        n_in++;
        for (int i = 0; i < DOUT; i++) if (ze[i] == 32767 || ze[i] == -32768) n_sat++;
      end
      if (!en) n_stall++;
      @(posedge clk);
      if (en) ecnt++;
      #1;
      if (en && out_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected output t=%0d", t);
        end else begin
          ze = exp_q.pop_front();
          if (ecnt - stamp_q.pop_front() != LAT) begin
            failures++; $display("latency wrong t=%0d", t);
          end
          for (int i = 0; i < DOUT; i++)
            if (longint'(z[i]) != ze[i]) begin
              failures++; $display("t=%0d z[%0d]=%0d exp %0d", t, i, z[i], ze[i]);
            end
          n_out++;
        end
      end
    end
    in_valid = 0; en = 1;
    repeat (LAT + 2) begin
      @(posedge clk); ecnt++; #1;
      if (out_valid) begin
        checks++;
        ze = exp_q.pop_front();
        void'(stamp_q.pop_front());
        for (int i = 0; i < DOUT; i++) if (longint'(z[i]) != ze[i]) failures++;
        n_out++;
      end
    end
    checks++;
    if (n_out != n_in || exp_q.size() != 0) begin
      failures++; $display("in %0d out %0d", n_in, n_out);
    end
    checks++;
    if (n_stall == 0 || n_sat == 0) begin failures++; $display("stall/sat not exercised"); end
    $display("inputs=%0d stalls=%0d saturated=%0d", n_in, n_stall, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
