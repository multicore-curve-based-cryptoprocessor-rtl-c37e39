// tb_dbc: STORE and LOAD through the data bus controller. With a random
// slice assignment of the six register files it checks which files are
// written, the address, and the placement of the 32-bit word in data and
// mask; for LOAD it checks the read request and that dout carries the
// selected word of the selected file one cycle later.
module tb_dbc;
  import cp_pkg::*;
  localparam int unsigned NC = ALPHA;
  localparam int unsigned W  = SLICE_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic req = 0, is_load = 0, rd_en, dout_valid;
  logic [2:0] slice, word, core_slice [NC];
  logic [4:0] addr, rf_waddr, rd_addr;
  logic [31:0] wdata, dout;
  logic [NC-1:0] rf_we;
  logic [W-1:0] rf_wdata, rf_wmask, rd_data [NC];
  logic [2:0] rd_rf;

  dbc dut (.clk(clk), .rst_n(rst_n), .req(req), .is_load(is_load), .slice(slice),
    .word(word), .addr(addr), .wdata(wdata), .core_slice(core_slice), .rf_we(rf_we),
    .rf_waddr(rf_waddr), .rf_wdata(rf_wdata), .rf_wmask(rf_wmask), .rd_en(rd_en),
    .rd_rf(rd_rf), .rd_addr(rd_addr), .rd_data(rd_data), .dout(dout), .dout_valid(dout_valid));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    slice = '0; word = '0; addr = '0; wdata = '0;
    for (int k = 0; k < NC; k++) begin core_slice[k] = '0; rd_data[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (300) begin
      logic [127:0] m, d;
      int g;
      g = $urandom_range(0, 2);
      g = (g == 0) ? 1 : (g == 1) ? 2 : 3;
      for (int k = 0; k < NC; k++) begin
        core_slice[k] = 3'(k % g);
        rd_data[k] = W'({$urandom, $urandom, $urandom, $urandom});
      end
      @(negedge clk);
      req = 1; is_load = $urandom_range(0, 1) == 1;
      slice = 3'($urandom_range(0, g - 1)); word = 3'($urandom_range(0, 3));
      addr = 5'($urandom); wdata = $urandom;
      #1;
      if (!is_load) begin
        m = 128'hFFFF_FFFF << (32 * word);
        d = 128'(wdata) << (32 * word);
        for (int k = 0; k < NC; k++)
          check(rf_we[k] == (core_slice[k] == slice), "write enable of file");
        check(rf_waddr == addr && rf_wmask == W'(m) && rf_wdata == W'(d), "store data and mask");
        check(!rd_en, "no read on store");
      end else begin
        check(rf_we == '0, "no write on load");
        check(rd_en && rd_rf == slice && rd_addr == addr, "load request");
        d = 128'(rd_data[slice]) >> (32 * word);
      end
      @(negedge clk);
      req = 0;
      check(dout_valid == is_load, "dout_valid");
      if (is_load) check(dout == d[31:0], "load data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
