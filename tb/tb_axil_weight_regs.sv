// tb_axil_weight_regs: writes every weight register of a 208-entry block
// over AXI4-Lite (address and data presented in different orders), reads
// them back, checks the weight outputs, byte strobes, SLVERR for addresses
// past the block, and a delayed BREADY / RREADY.
module tb_axil_weight_regs;
  localparam int NW = 208, W = 16, AW = 16;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = 0, rdata;
  logic [3:0]  wstrb = 0;
  logic [1:0]  bresp, rresp;
  logic signed [W-1:0] weights [NW];
  logic signed [W-1:0] model [NW];
  int checks = 0, failures = 0;

  axil_weight_regs #(.NW(NW), .W(W), .ADDR_W(AW)) dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready), .weights);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axil_write(input logic [AW-1:0] a, input logic [31:0] d,
                            input logic [3:0] s, input int skew, output logic [1:0] resp);
    awaddr = a; wdata = d; wstrb = s;
    if (skew >= 0) awvalid = 1;
    if (skew <= 0) wvalid = 1;
    if (skew != 0) begin @(posedge clk); #1; awvalid = 1; wvalid = 1; end
    do begin @(posedge clk); end while (!(awready && wready));
    #1; awvalid = 0; wvalid = 0;
    repeat ($urandom % 3) @(posedge clk);
    #1; bready = 1;
    do begin @(posedge clk); end while (!bvalid);
    resp = bresp;
    #1; bready = 0;
  endtask

  task automatic axil_read(input logic [AW-1:0] a, output logic [31:0] d,
                           output logic [1:0] resp);
    araddr = a; arvalid = 1;
    do begin @(posedge clk); end while (!arready);
    #1; arvalid = 0;
    repeat ($urandom % 3) @(posedge clk);
    #1; rready = 1;
    do begin @(posedge clk); end while (!rvalid);
    d = rdata; resp = rresp;
    #1; rready = 0;
  endtask

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (weights[5] != 0) begin failures++; $display("reset value"); end
    for (int n = 0; n < NW; n++) begin
      model[n] = W'($urandom);
      axil_write(AW'(4 * n), {16'hdead, model[n]}, 4'hf, int'($urandom % 3) - 1, resp);
      checks++;
      if (resp != 2'b00) begin failures++; $display("bresp %0d at %0d", resp, n); end
    end
    // byte strobe: only the high byte of weight 7
    model[7][15:8] = 8'h5a;
    axil_write(AW'(4 * 7), 32'h0000_5a00 | 32'h00a5, 4'b0010, 0, resp);
    // out of range
    axil_write(AW'(4 * NW), 32'h1234, 4'hf, 0, resp);
    checks++;
    if (resp != 2'b10) begin failures++; $display("no SLVERR on write"); end
    axil_read(AW'(4 * NW + 8), d, resp);
    checks++;
    if (resp != 2'b10) begin failures++; $display("no SLVERR on read"); end
    for (int n = 0; n < NW; n++) begin
      checks += 2;
      if (weights[n] != model[n]) begin failures++; $display("weight %0d", n); end
      axil_read(AW'(4 * n), d, resp);
      if (d != 32'($signed(model[n])) || resp != 2'b00) begin
        failures++; $display("read %0d got %h", n, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
