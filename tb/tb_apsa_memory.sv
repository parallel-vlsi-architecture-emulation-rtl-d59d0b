// tb_apsa_memory -- self-checking testbench of apsa_memory.
//
// A 16-cell memory (LEVELS = 4) first runs the worked list example: the list
// (a b d e) is shifted in behind a free cell, c is inserted after b with
// match / mark-to-select / insert, the head is matched and index(3) must
// select d; read must return d and last must select e. Then thousands of
// random instructions on random contents are compared, cell by cell and
// response by response, with the sequential reference model. Every
// instruction is checked to finish in one cycle (state visible after one
// edge; read response exactly one cycle after the read).
module tb_apsa_memory;
  import apsa_pkg::*;
  import apsa_ref_pkg::*;

  localparam int LEVELS  = 4;
  localparam int N_CELLS = 2**LEVELS;

  logic       clk = 0;
  logic       rst_n;
  logic       ins_valid;
  instr_t     ins;
  logic       rsp_valid, rsp_found, any_sel;
  cell_word_t rsp_word;
  cell_word_t cell_word [N_CELLS];
  logic       cell_sel  [N_CELLS];
  logic       cell_mark [N_CELLS];

  int checks = 0, failures = 0;
  apsa_ref ref_m;

  apsa_memory #(.LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cell_word_t vword(int v, bit att);
    cell_word_t w;
    w.typ = CT_VAL;
    w.att = att;
    w.val = VAL_W'(v);
    return w;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic compare_all(string tag);
    bit ok = 1;
    for (int i = 0; i < N_CELLS; i++)
      if (cell_word[i] !== ref_m.word[i] || cell_sel[i] !== ref_m.sel[i] || cell_mark[i] !== ref_m.mark[i]) begin
        ok = 0;
        $display("  cell %0d: dut %h s%0d m%0d  ref %h s%0d m%0d", i, cell_word[i], cell_sel[i], cell_mark[i],
                 ref_m.word[i], ref_m.sel[i], ref_m.mark[i]);
      end
    check(ok, tag);
  endtask

  // Issue one instruction for one cycle; state and response are checked
  // right after the edge that ends it.
  task automatic issue(instr_t i);
    ins       <= i;
    ins_valid <= 1'b1;
    @(posedge clk);
    ins_valid <= 1'b0;
    ins       <= '0;
    ref_m.exec(i);
    #1;
    compare_all($sformatf("state after op %s", i.op.name()));
    check(rsp_valid == (i.op == OP_READ), "rsp_valid timing");
    if (i.op == OP_READ)
      check(rsp_found == ref_m.rsp_found && rsp_word == ref_m.rsp_word, "read response");
  endtask

  function automatic instr_t mk(opcode_e op, cell_word_t w, int n);
    instr_t i;
    i.op  = op;
    i.opd = w;
    i.n   = CNT_W'(n);
    return i;
  endfunction

  initial begin
    int a = 10, b = 11, c = 12, d = 13, e = 14;
    ref_m = new(N_CELLS);
    rst_n = 0; ins_valid = 0; ins = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 compare_all("after reset");

    // Load (free a b d e) into cells 0..4 by right shifts, last word first.
    issue(mk(OP_SHIFT_R, vword(e, 0), 0));
    issue(mk(OP_SHIFT_R, vword(d, 1), 0));
    issue(mk(OP_SHIFT_R, vword(b, 1), 0));
    issue(mk(OP_SHIFT_R, vword(a, 1), 0));
    issue(mk(OP_SHIFT_R, FREE_WORD, 0));
    // Insert c after b.
    issue(mk(OP_MATCH, vword(b, 0), 0));
    check(cell_sel[2] && !cell_sel[1] && !cell_sel[3], "match selects b");
    issue(mk(OP_MARK_SEL, FREE_WORD, 0));
    check(cell_mark[0] && cell_mark[1] && !cell_mark[2] && !cell_mark[3], "marks left of b");
    issue(mk(OP_INSERT, vword(c, 0), 0));
    check(cell_word[0] == vword(a, 1) && cell_word[1] == vword(b, 1) && cell_word[2] == vword(c, 1) &&
          cell_word[3] == vword(d, 1) && cell_word[4] == vword(e, 0), "list is (a b c d e)");
    // Index 3 from the head, read it, then find the last element.
    issue(mk(OP_MATCH, vword(a, 0), 0));
    issue(mk(OP_INDEX, FREE_WORD, 3));
    check(cell_sel[3] && !cell_sel[0], "index(3) selects d");
    issue(mk(OP_READ, FREE_WORD, 0));
    check(rsp_found && rsp_word.val == VAL_W'(d), "read returns d");
    issue(mk(OP_MATCH, vword(a, 0), 0));
    issue(mk(OP_LAST, FREE_WORD, 0));
    check(cell_sel[4] && !cell_sel[3], "last selects e");
    // Delete c.
    issue(mk(OP_MATCH, vword(c, 0), 0));
    issue(mk(OP_MARK_SEL, FREE_WORD, 0));
    issue(mk(OP_DELETE, FREE_WORD, 0));
    check(cell_word[1] == vword(a, 1) && cell_word[2] == vword(b, 1) && cell_word[3] == vword(d, 1), "c deleted");

    // Random instructions on small values so that matches and lists are common.
    for (int t = 0; t < 4000; t++) begin
      instr_t     i;
      cell_word_t w;
      w.typ = cell_type_e'($urandom_range(0, 3) == 0 ? CT_FREE : CT_VAL);
      w.att = 1'($urandom_range(0, 3) != 0);
      w.val = VAL_W'($urandom_range(0, 5));
      i.opd = w;
      i.n   = CNT_W'($urandom_range(0, 6));
      i.op  = opcode_e'($urandom_range(0, 9));
      issue(i);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
