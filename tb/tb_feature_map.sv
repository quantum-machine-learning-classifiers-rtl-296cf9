// tb_feature_map: sweeps every table address plus out-of-range inputs and
// compares sin/cos outputs with round(2^FRAC * sin(pi x/2)) computed in real
// arithmetic; also checks the one-cycle latency and the enable.
module tb_feature_map;
  import ttn_ref_pkg::*;
  localparam int W = 16, FRAC = 14, ABITS = 10;
  logic clk = 0, en = 1;
  logic signed [W-1:0] x, ps, pc;
  int checks = 0, failures = 0;

  feature_map #(.W(W), .FRAC(FRAC), .ABITS(ABITS)) dut (
    .clk, .en, .x, .phi_sin(ps), .phi_cos(pc));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_x(longint xv);
    int a;
    x = W'(xv);
    @(posedge clk); #1;
    a = fm_addr(xv, FRAC, ABITS);
    checks += 2;
    if (longint'(ps) != fm_sin(a, FRAC, ABITS)) begin
      failures++; $display("sin x=%0d got %0d exp %0d", xv, ps, fm_sin(a, FRAC, ABITS));
    end
    if (longint'(pc) != fm_sin((1 << ABITS) - a, FRAC, ABITS)) begin
      failures++; $display("cos x=%0d got %0d", xv, pc);
    end
  endtask

  initial begin
    // every address, with random low bits below the address resolution
    for (int a = 0; a <= (1 << ABITS); a++)
      check_x((longint'(a) <<< (FRAC - ABITS)) +
              ((a == (1 << ABITS)) ? 0 : ($urandom % (1 << (FRAC - ABITS)))));
    check_x(-100);
    check_x(-32768);
    check_x(32767);
    check_x(20000);
    // endpoints: sin(0)=0, cos(0)=1, sin(pi/2)=1
    x = 0; @(posedge clk); #1;
    checks++; if (ps != 0 || pc != 16384) begin failures++; $display("x=0 wrong"); end
    x = 16384; @(posedge clk); #1;
    checks++; if (ps != 16384 || pc != 0) begin failures++; $display("x=1 wrong"); end
    // enable low holds the output
    en = 0; x = 8192; @(posedge clk); #1;
    checks++; if (ps != 16384) begin failures++; $display("enable ignored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
