// tb_prlut: the PRLUT against an ordered-list model.
//
// Random GetS/GetM inserts to four lines, a random set of blocked lines
// (as the controller's owner table would give), random dequeues. Every cycle
// the offered request must be the oldest one that has no older request to
// its line and whose line is not blocked. Also checks that a request to a
// free line was offered while an older request to another, blocked line
// waited (service out of broadcast order across lines).
// Per-line broadcast order follows the platform's PRLUT; letting other
// lines pass a blocked one is this design's choice.
module tb_prlut;
  import maple_pkg::*;
  localparam int E = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ins_valid, sel_valid, deq, full;
  bus_req_t ins, sel;
  logic [E-1:0] ent_valid, blocked;
  laddr_t ent_line [E];
  prlut #(.ENTRIES(E)) dut (.*);

  bus_req_t model [$];
  bit blk_line [4];
  int checks = 0, failures = 0, n_bypass = 0;

  always_comb for (int i = 0; i < E; i++) blocked[i] = blk_line[ent_line[i][1:0]];

  initial begin
    ins_valid = 0; ins = '0; deq = 0;
    foreach (blk_line[l]) blk_line[l] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int k;
      if ($urandom_range(0, 7) == 0) blk_line[$urandom_range(0, 3)] = $urandom_range(0, 1);
      #1;
      k = -1;
      for (int i = 0; i < model.size(); i++) begin
        bit older;
        older = 0;
        for (int j = 0; j < i; j++) if (model[j].line == model[i].line) older = 1;
        if (k < 0 && !older && !blk_line[model[i].line[1:0]]) k = i;
      end
      checks++;
      if (sel_valid != (k >= 0) || (k >= 0 && sel != model[k]) || full != (model.size() == E)) begin
        failures++;
        if (failures < 6) $display("FAIL: cycle %0d want idx %0d size %0d", cyc, k, model.size());
      end
      if (k > 0 && model[0].line != model[k].line) n_bypass++;
      deq = sel_valid && $urandom_range(0, 2) == 0;
      ins_valid = (model.size() < E || deq) && $urandom_range(0, 2) == 0;
      ins.valid = 1'b1;
      ins.msg   = $urandom_range(0, 1) ? MSG_GETS : MSG_GETM;
      ins.src   = cid_t'($urandom_range(0, 8));
      ins.line  = laddr_t'($urandom_range(0, 3));
      @(posedge clk);
      if (deq && k >= 0) model.delete(k);
      if (ins_valid) model.push_back(ins);
      @(negedge clk);
    end
    checks++;
    if (n_bypass == 0) begin failures++; $display("FAIL: no out-of-order service across lines"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
