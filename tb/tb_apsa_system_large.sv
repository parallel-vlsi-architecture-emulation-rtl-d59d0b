// tb_apsa_system_large -- a 1,024-cell system (LEVELS = 10, the 32 x 32
// layout size) through the worked list example.
//
// The list (a b d e) is shifted in behind a free cell; c is inserted after b
// (3 cycles); nth(a, 3) must return d and last(a) must return e (3 cycles
// each, result on the last cycle); c is deleted again and nth(a, 2) must then
// return d. A value shifted in from the right end must land in the last
// cell, far from the list, and index and last from it must work across the
// whole tree. Contents of the list cells are checked after each step.
module tb_apsa_system_large;
  import apsa_pkg::*;

  localparam int LEVELS  = 10;
  localparam int N_CELLS = 2**LEVELS;

  logic             clk = 0, rst_n;
  logic             cmd_valid, cmd_ready, res_valid, res_found, any_sel, mem_valid, busy;
  logic [2:0]       cmd;
  logic [VAL_W-1:0] cmd_key, cmd_val;
  logic [CNT_W-1:0] cmd_n;
  instr_t           cmd_ins, mem_ins;
  cell_word_t       res_word;
  cell_word_t       cell_word [N_CELLS];
  logic             cell_sel  [N_CELLS];
  logic             cell_mark [N_CELLS];
  int checks = 0, failures = 0;
  bit got_res;
  cell_word_t got_word;

  apsa_system #(.LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic cell_word_t vword(int v, bit att);
    cell_word_t w;
    w.typ = CT_VAL; w.att = att; w.val = VAL_W'(v);
    return w;
  endfunction

  task automatic run(logic [2:0] k, int key, int val, int n, opcode_e op, cell_word_t opd, int exp_cycles);
    int cycles;
    cmd_valid = 1; cmd = k; cmd_key = VAL_W'(key); cmd_val = VAL_W'(val); cmd_n = CNT_W'(n);
    cmd_ins = '0; cmd_ins.op = op; cmd_ins.opd = opd;
    @(posedge clk);
    #1;
    cmd_valid = 0;
    cycles = 0;
    got_res = 0;
    while (busy) begin
      @(posedge clk);
      #1;
      cycles++;
      if (res_valid) begin
        got_res  = res_found;
        got_word = res_word;
      end
    end
    check(cycles == exp_cycles, $sformatf("command %0d took %0d cycles", k, cycles));
  endtask

  initial begin
    rst_n = 0; cmd_valid = 0; cmd = 0; cmd_key = 0; cmd_val = 0; cmd_n = 0; cmd_ins = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    run(0, 0, 0, 0, OP_SHIFT_R, vword('he, 0), 1);
    run(0, 0, 0, 0, OP_SHIFT_R, vword('hd, 1), 1);
    run(0, 0, 0, 0, OP_SHIFT_R, vword('hb, 1), 1);
    run(0, 0, 0, 0, OP_SHIFT_R, vword('ha, 1), 1);
    run(0, 0, 0, 0, OP_SHIFT_R, FREE_WORD, 1);
    check(cell_word[0] == FREE_WORD && cell_word[1] == vword('ha, 1) && cell_word[4] == vword('he, 0), "list (a b d e) loaded");
    run(1, 'hb, 'hc, 0, OP_NOP, FREE_WORD, 3);
    check(cell_word[0] == vword('ha, 1) && cell_word[1] == vword('hb, 1) && cell_word[2] == vword('hc, 1) &&
          cell_word[3] == vword('hd, 1) && cell_word[4] == vword('he, 0), "list (a b c d e) after insert");
    check(cell_mark[0] && cell_mark[1] && !cell_mark[2] && cell_sel[2], "marks left of the selected cell");
    run(3, 'ha, 0, 3, OP_NOP, FREE_WORD, 3);
    check(got_res && got_word == vword('hd, 1) && cell_sel[3], "nth(a, 3) = d");
    run(4, 'ha, 0, 0, OP_NOP, FREE_WORD, 3);
    check(got_res && got_word == vword('he, 0) && cell_sel[4], "last(a) = e");
    run(2, 'hc, 0, 0, OP_NOP, FREE_WORD, 3);
    check(cell_word[0] == FREE_WORD && cell_word[1] == vword('ha, 1) && cell_word[2] == vword('hb, 1) &&
          cell_word[3] == vword('hd, 1), "c deleted");
    run(3, 'ha, 0, 2, OP_NOP, FREE_WORD, 3);
    check(got_res && got_word == vword('hd, 1), "nth(a, 2) = d after delete");
    // A two-element list (x y) entering at the far right end.
    run(0, 0, 0, 0, OP_SHIFT_L, vword('h77, 1), 1);
    run(0, 0, 0, 0, OP_SHIFT_L, vword('h78, 0), 1);
    check(cell_word[N_CELLS-1] == vword('h78, 0) && cell_word[N_CELLS-2] == vword('h77, 1), "shift left fills the last cell");
    run(3, 'h77, 0, 1, OP_NOP, FREE_WORD, 3);
    check(got_res && got_word.val == 'h78, "nth(x, 1) at the right end");
    run(3, 'h77, 0, 2, OP_NOP, FREE_WORD, 3);
    check(!got_res, "nth past the end finds nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
