// tb_rf4r1w: random masked writes and four simultaneous random reads of the
// 4R1W register file, compared with an array model; also checks that p_out
// always shows entry 0 and that a read in the write cycle sees the old word.
module tb_rf4r1w;
  localparam int unsigned W = cp_pkg::SLICE_W;
  localparam int unsigned DEPTH = cp_pkg::RF_DEPTH;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]   raddr [4], waddr;
  logic [W-1:0] rdata [4], p_out, wdata, wmask;
  logic         we = 0;
  logic [W-1:0] model [DEPTH];

  rf4r1w dut (.clk(clk), .raddr(raddr), .rdata(rdata), .p_out(p_out), .we(we),
              .waddr(waddr), .wdata(wdata), .wmask(wmask));

  int checks = 0, failures = 0;

  function automatic logic [W-1:0] rnd();
    return W'({$urandom, $urandom, $urandom, $urandom});
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) raddr[i] = '0;
    waddr = '0; wdata = '0; wmask = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      we = 1; waddr = 5'(i); wdata = rnd(); wmask = '1; model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    repeat (400) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) raddr[i] = 5'($urandom);
      we = $urandom_range(0, 1) == 1;
      waddr = 5'($urandom);
      wdata = rnd();
      wmask = ($urandom_range(0, 1) == 1) ? '1 : W'(64'hFFFF_FFFF) << (32 * $urandom_range(0, 3));
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (rdata[i] !== model[raddr[i]]) begin
          failures++;
          $display("FAIL port %0d addr %0d", i, raddr[i]);
        end
      end
      checks++;
      if (p_out !== model[0]) begin failures++; $display("FAIL p_out"); end
      if (we) model[waddr] = (model[waddr] & ~wmask) | (wdata & wmask);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
