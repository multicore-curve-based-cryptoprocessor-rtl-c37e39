// tb_ucode_ram: fills the 256-word micro-code RAM, then reads it back in
// random order with the one-cycle read latency, including a read of a word
// written in the same cycle (old word returned) and reads held with re low.
module tb_ucode_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        we = 0, re = 0;
  logic [7:0]  waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [256];

  ucode_ram dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(re),
                 .raddr(raddr), .rdata(rdata));

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    repeat (600) begin
      logic [31:0] exp_v;
      logic        held;
      held = $urandom_range(0, 4) == 0;
      re = !held;
      raddr = 8'($urandom);
      we = $urandom_range(0, 3) == 0;
      waddr = we ? raddr : 8'($urandom);
      wdata = $urandom;
      exp_v = held ? rdata : model[raddr];
      @(negedge clk);
      checks++;
      if (rdata !== exp_v) begin failures++; $display("FAIL addr %0d", raddr); end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
