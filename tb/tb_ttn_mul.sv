// tb_ttn_mul: checks the fixed-point DSP multiplier against floor(a*b/2^FRAC)
// with random operands, its pipeline latency of LAT cycles and that a low
// enable freezes the pipeline.
module tb_ttn_mul;
  import ttn_ref_pkg::*;
  localparam int W = 16, FRAC = 14, LAT = 3, PW = 2 * W - FRAC;

  logic clk = 0, en = 1;
  logic signed [W-1:0] a, b;
  logic signed [PW-1:0] p;
  int checks = 0, failures = 0;
  longint expq [$];

  ttn_mul #(.W(W), .FRAC(FRAC), .LAT(LAT)) dut (.clk, .en, .a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e [LAT + 1];
    // Stream random operands; output of cycle t matches inputs of cycle t-LAT.
    for (int t = 0; t < 400; t++) begin
      if (t < 4) begin
        a = (t[0]) ? 16'sh7fff : -16'sh8000;
        b = (t[1]) ? 16'sh7fff : -16'sh8000;
      end else begin
        a = W'($urandom);
        b = W'($urandom);
      end
      expq.push_back(mulq(a, b, FRAC));
      @(posedge clk); #1;
      if (expq.size() > LAT - 1 + 1) void'(expq.pop_front());
      if (t >= LAT - 1) begin
        checks++;
        if (longint'(p) != expq[0]) begin
          failures++;
          $display("mismatch t=%0d p=%0d exp=%0d", t, p, expq[0]);
        end
      end
    end
    // Stall: hold en low, output must not change.
    begin
      logic signed [PW-1:0] held;
      held = p;
      en = 0;
      a = 16'sh1234; b = 16'sh4321;
      repeat (5) @(posedge clk);
      #1;
      checks++;
      if (p != held) begin failures++; $display("stall broken"); end
      en = 1;
      repeat (LAT) @(posedge clk);
      #1;
      checks++;
      if (longint'(p) != mulq(16'sh1234, 16'sh4321, FRAC)) begin
        failures++; $display("after stall p=%0d", p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
