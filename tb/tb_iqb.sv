// tb_iqb: random pushes and random out-of-order removals on the instruction
// queue buffer, compared with a queue model: order of the remaining entries,
// valid flags, count, full flag and a push refused while full.
module tb_iqb;
  import cp_pkg::*;
  localparam int unsigned DEPTH = ILP_D;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic push = 0, full;
  malu_instr_t pd, entry [DEPTH];
  logic [DEPTH-1:0] valid, pop_mask;
  logic [$clog2(DEPTH+1)-1:0] count;
  malu_instr_t model [$];

  iqb dut (.clk(clk), .rst_n(rst_n), .push(push), .push_data(pd), .full(full),
           .count(count), .entry(entry), .valid(valid), .pop_mask(pop_mask));

  int checks = 0, failures = 0, full_seen = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pd = '0; pop_mask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (1000) begin
      @(negedge clk);
      // compare
      checks++;
      if (int'(count) != model.size() || full != (model.size() == DEPTH)) begin
        failures++; $display("FAIL count %0d model %0d", count, model.size());
      end
      for (int i = 0; i < int'(DEPTH); i++) begin
        checks++;
        if (valid[i] != (i < model.size()) || (i < model.size() && entry[i] != model[i])) begin
          failures++; $display("FAIL entry %0d", i);
        end
      end
      if (full) full_seen++;
      push = $urandom_range(0, 2) != 0;
      pd = malu_instr_t'($urandom);
      pop_mask = '0;
      if ($urandom_range(0, 2) == 0)
        for (int i = 0; i < model.size(); i++) pop_mask[i] = $urandom_range(0, 1);
      begin
        malu_instr_t nm [$];
        nm.delete();
        foreach (model[i]) if (!pop_mask[i]) nm.push_back(model[i]);
        if (push && model.size() < DEPTH) nm.push_back(pd);
        model = nm;
      end
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
