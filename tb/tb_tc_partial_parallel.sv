// tb_tc_partial_parallel: drives a DIN=4, DOUT=4 partial-parallel node with
// random vector pairs through valid/ready on both sides, with random input
// gaps and output back-pressure. Results are compared in order with the
// reference contraction; the latency of an undisturbed sample must be
// ttn_pkg::pp_node_latency cycles, two back-to-back samples must be taken
// DIN^2 + DSP_LAT + 2 cycles apart, and a held output must stay stable.
module tb_tc_partial_parallel;
  import ttn_pkg::*;
  import ttn_ref_pkg::*;
  localparam int DIN = 4, DOUT = 4, W = 16, FRAC = 14, DSP_LAT = 3;
  localparam int LAT = pp_node_latency(DIN, DOUT, DSP_LAT);

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic signed [W-1:0] x [DIN], y [DIN], v [DOUT][DIN][DIN], z [DOUT];
  logic signed [W-1:0] zhold [DOUT];
  logic held = 0;
  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_bp = 0, n_sat = 0;
  int cyc = 0;
  longint vflat [];
  longint exp_q [$][];

  tc_partial_parallel #(.DIN(DIN), .DOUT(DOUT), .W(W), .FRAC(FRAC), .DSP_LAT(DSP_LAT))
    dut (.clk, .rst_n, .in_valid, .in_ready, .x, .y, .v, .out_valid, .out_ready, .z);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_input(bit big);
    for (int j = 0; j < DIN; j++) begin
      x[j] = big ? 16'sh7fff : W'($urandom);
      y[j] = big ? 16'sh7fff : W'($urandom);
    end
  endtask

  function automatic void push_expected();
    longint xa[], ya[], ze[];
    xa = new[DIN]; ya = new[DIN];
    for (int j = 0; j < DIN; j++) begin xa[j] = x[j]; ya[j] = y[j]; end
    contract(DIN, DOUT, xa, ya, vflat, W, FRAC, ze);
    for (int i = 0; i < DOUT; i++) if (ze[i] == 32767 || ze[i] == -32768) n_sat++;
    exp_q.push_back(ze);
  endfunction

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (held) begin
        checks++;
        for (int i = 0; i < DOUT; i++)
          if (z[i] != zhold[i]) begin failures++; $display("held output changed"); end
      end
      if (out_ready) begin
        longint ze[];
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected output");
        end else begin
          ze = exp_q.pop_front();
          for (int i = 0; i < DOUT; i++)
            if (longint'(z[i]) != ze[i]) begin
              failures++; $display("z[%0d]=%0d exp %0d", i, z[i], ze[i]);
            end
        end
        n_out++;
        held <= 0;
      end else begin
        n_bp++;
        held <= 1;
        zhold <= z;
      end
    end
  end

  initial begin
    int t0;
    vflat = new[DOUT * DIN * DIN];
    for (int q = 0; q < DOUT * DIN * DIN; q++) begin
      vflat[q] = longint'($signed(W'($urandom)));
      v[q / (DIN * DIN)][(q / DIN) % DIN][q % DIN] = W'(vflat[q]);
    end
    new_input(0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // Latency of one undisturbed sample.
    #1;
    in_valid = 1;
    push_expected();
    t0 = cyc;
    @(posedge clk); #1;
    in_valid = 0;
    while (!out_valid) begin @(posedge clk); #1; end
    checks++;
    if (cyc - t0 != LAT) begin failures++; $display("latency %0d exp %0d", cyc - t0, LAT); end
    @(posedge clk); #1;
    // Initiation interval: two samples offered back to back, output always read.
    begin
      int ta, tb2;
      in_valid = 1;
      new_input(0);
      while (!in_ready) begin @(posedge clk); #1; end
      push_expected();
      ta = cyc;
      @(posedge clk); #1;
      new_input(0);
      while (!in_ready) begin @(posedge clk); #1; end
      push_expected();
      tb2 = cyc;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (tb2 - ta != DIN * DIN + DSP_LAT + 2) begin
        failures++; $display("interval %0d exp %0d", tb2 - ta, DIN * DIN + DSP_LAT + 2);
      end
      n_in += 2;
      repeat (3 * LAT) @(posedge clk);
      #1;
    end
    // Random traffic with back-pressure.
    for (int s = 0; s < 200; s++) begin
      new_input(s % 40 == 3);
      in_valid = 1;
      while (1) begin
        out_ready = ($urandom % 4) != 0;
        @(posedge clk);
        if (in_ready) break;
        #1;
      end
      push_expected();
      n_in++;
      #1;
      in_valid = 0;
      repeat ($urandom % 3) begin out_ready = ($urandom % 4) != 0; @(posedge clk); #1; end
    end
    out_ready = 1;
    repeat (4 * LAT) @(posedge clk);
    #1;
    checks++;
    if (exp_q.size() != 0 || n_out != n_in + 1) begin
      failures++; $display("in %0d out %0d left %0d", n_in + 1, n_out, exp_q.size());
    end
    checks++;
    if (n_bp == 0 || n_sat == 0) begin failures++; $display("back-pressure/saturation not exercised"); end
    $display("samples=%0d backpressure_cycles=%0d saturated=%0d", n_in + 1, n_bp, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
