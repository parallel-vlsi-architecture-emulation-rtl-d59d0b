// tb_apsa_cell -- self-checking testbench of one APSA memory cell.
//
// The cell is put into random states (word loaded with a right shift, select
// set or cleared with match, mark set or cleared with mark-to-select) and then
// given one random instruction with random neighbours and tree context. The
// expected next state is written out here rule by rule from the instruction
// definitions. The cell's summary to the tree is checked too. Each
// instruction must take effect at the first clock edge.
module tb_apsa_cell;
  import apsa_pkg::*;

  logic       clk = 0, rst_n;
  instr_t     ins;
  cell_word_t left_word, right_word, word;
  logic       right_sel, sel, mark;
  dn_t        ctx;
  up_t        leaf_up;
  int checks = 0, failures = 0;

  apsa_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
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

  function automatic cell_word_t rnd_word();
    cell_word_t w;
    w.typ = cell_type_e'($urandom_range(0, 3));
    w.att = 1'($urandom_range(0, 1));
    w.val = VAL_W'($urandom_range(0, 3));
    return w;
  endfunction

  task automatic step(opcode_e op, cell_word_t opd, cell_word_t lw, cell_word_t rw, bit rs, dn_t c, int n);
    ins.op = op; ins.opd = opd; ins.n = CNT_W'(n);
    left_word = lw; right_word = rw; right_sel = rs; ctx = c;
    @(posedge clk);
    #1;
  endtask

  initial begin
    dn_t none;
    none = '0;
    rst_n = 0; ins = '0; left_word = '0; right_word = '0; right_sel = 0; ctx = '0;
    @(posedge clk);
    #1;
    check(word == FREE_WORD && !sel && !mark, "reset empties the cell");
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      cell_word_t w0, lw, rw, opd, ew;
      bit s0, m0, rs, es, em;
      dn_t c;
      opcode_e op;
      int n, pos;
      // Set up a random state.
      w0 = rnd_word();
      w0.typ = ($urandom_range(0, 2) == 0) ? CT_FREE : CT_VAL;
      s0 = 1'($urandom_range(0, 1));
      m0 = 1'($urandom_range(0, 1));
      step(OP_SHIFT_R, FREE_WORD, w0, FREE_WORD, 0, none, 0);
      check(word == w0, "shift right loads left neighbour");
      begin
        cell_word_t k;
        k = w0;
        k.val = s0 ? w0.val : w0.val + 1;
        step(OP_MATCH, k, FREE_WORD, FREE_WORD, 0, none, 0);
      end
      s0 = s0 && (w0.typ == CT_VAL);
      c = none; c.sel_right = m0;
      step(OP_MARK_SEL, FREE_WORD, FREE_WORD, FREE_WORD, 0, c, 0);
      check(sel == s0 && mark == m0 && word == w0, "state set-up");
      // Summary to the tree.
      check(leaf_up.any_sel == s0 && leaf_up.first_word == w0, "leaf summary select/word");
      if (!w0.att)      check(leaf_up.fn.cnst && !leaf_up.fn.vld, "unattached cell ends a chain");
      else if (s0)      check(leaf_up.fn.cnst && leaf_up.fn.vld && leaf_up.fn.k == 1, "selected head starts a chain");
      else              check(!leaf_up.fn.cnst && leaf_up.fn.k == 1, "attached cell adds one");
      // One random instruction.
      op  = opcode_e'($urandom_range(0, 9));
      opd = rnd_word();
      lw  = rnd_word();
      rw  = rnd_word();
      rs  = 1'($urandom_range(0, 1));
      c.sel_right = 1'($urandom_range(0, 1));
      c.cin.vld   = 1'($urandom_range(0, 1));
      c.cin.k     = CNT_W'($urandom_range(0, 4));
      n   = $urandom_range(0, 4);
      pos = s0 ? 0 : (c.cin.vld ? int'(c.cin.k) : -1);
      ew = w0; es = s0; em = m0;
      case (op)
        OP_MATCH:    es = (w0.typ == CT_VAL) && (w0.val == opd.val);
        OP_MARK_SEL: em = c.sel_right;
        OP_INSERT:   if (s0) begin ew.typ = CT_VAL; ew.val = opd.val; end
                     else if (m0) begin ew = rw; ew.att = rw.att | rs; end
        OP_DELETE:   if (s0) begin ew = lw; ew.att = lw.att & w0.att; end
                     else if (m0) ew = lw;
        OP_INDEX:    es = (pos == n);
        OP_LAST:     es = (pos >= 0) && (w0.typ == CT_VAL) && !w0.att;
        OP_SHIFT_R:  ew = lw;
        OP_SHIFT_L:  ew = rw;
        default: ;
      endcase
      step(op, opd, lw, rw, rs, c, n);
      check(word == ew && sel == es && mark == em, $sformatf("instruction %s", op.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
