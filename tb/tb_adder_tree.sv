// tb_adder_tree: checks the pipelined adder tree for a power-of-two and a
// padded input count: sums of random inputs, the latency of ceil(log2 NIN)
// cycles, and the freeze under a low enable.
module tb_adder_tree;
  localparam int IW = 18;
  logic clk = 0, en = 1;
  logic signed [IW-1:0] d4 [4];
  logic signed [IW-1:0] d5 [5];
  logic signed [IW+1:0] s4;
  logic signed [IW+2:0] s5;
  int checks = 0, failures = 0;
  longint e4 [$], e5 [$];

  adder_tree #(.NIN(4), .IW(IW)) u4 (.clk, .en, .din(d4), .sum(s4));
  adder_tree #(.NIN(5), .IW(IW)) u5 (.clk, .en, .din(d5), .sum(s5));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      longint a4, a5;
      a4 = 0; a5 = 0;
      for (int i = 0; i < 4; i++) begin
        d4[i] = (t < 2) ? ((t == 0) ? 18'sh1ffff : -18'sh20000) : IW'($urandom);
        a4 += d4[i];
      end
      for (int i = 0; i < 5; i++) begin
        d5[i] = (t < 2) ? ((t == 0) ? 18'sh1ffff : -18'sh20000) : IW'($urandom);
        a5 += d5[i];
      end
      e4.push_back(a4);
      e5.push_back(a5);
      @(posedge clk); #1;
      // latency 2 for NIN=4, 3 for NIN=5
      if (e4.size() == 2) begin
        checks++;
        if (longint'(s4) != e4[0]) begin failures++; $display("s4 %0d exp %0d", s4, e4[0]); end
        void'(e4.pop_front());
      end
      if (e5.size() == 3) begin
        checks++;
        if (longint'(s5) != e5[0]) begin failures++; $display("s5 %0d exp %0d", s5, e5[0]); end
        void'(e5.pop_front());
      end
    end
    begin
      logic signed [IW+1:0] h;
      h = s4; en = 0;
      for (int i = 0; i < 4; i++) d4[i] = 1;
      repeat (4) @(posedge clk); #1;
      checks++;
      if (s4 != h) begin failures++; $display("stall broken"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
