// tb_apsa_system -- end-to-end testbench of the APSA memory with its sequencer.
//
// A 64-cell system (LEVELS = 6) is loaded with several lists through raw
// right and left shifts, then driven with random list commands (insert after,
// delete, nth, last) and raw primitives. The testbench expands every command
// into its primitive sequence itself and runs the sequential reference model;
// after every command the whole memory and every read result must match, and
// each command must take its documented number of cycles (3 for a list
// command, 1 for a raw primitive, read result one cycle after the read).
// It counts how often each mechanism occurred -- shifts both ways, match,
// mark-to-select, insert, delete, index hits and misses, last, fetch, a
// command held off while the sequencer was busy -- and fails any that never
// occurred.
module tb_apsa_system;
  import apsa_pkg::*;
  import apsa_ref_pkg::*;

  localparam int LEVELS  = 6;
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
  int n_shift_r = 0, n_shift_l = 0, n_insert = 0, n_delete = 0, n_index_hit = 0,
      n_index_miss = 0, n_last = 0, n_read = 0, n_stall = 0, n_match = 0, n_mark = 0;
  apsa_ref ref_m;

  apsa_system #(.LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
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

  function automatic instr_t mk(opcode_e op, cell_word_t w, int n);
    instr_t i;
    i.op = op; i.opd = w; i.n = CNT_W'(n);
    return i;
  endfunction

  function automatic cell_word_t vword(int v, bit att);
    cell_word_t w;
    w.typ = CT_VAL; w.att = att; w.val = VAL_W'(v);
    return w;
  endfunction

  task automatic compare_all(string tag);
    bit ok;
    ok = 1;
    for (int i = 0; i < N_CELLS; i++)
      if (cell_word[i] !== ref_m.word[i] || cell_sel[i] !== ref_m.sel[i] || cell_mark[i] !== ref_m.mark[i]) ok = 0;
    check(ok, tag);
  endtask

  // Run one command; the expected primitive list is built here, not taken
  // from the design.
  task automatic run(logic [2:0] k, int key, int val, int n, instr_t raw);
    instr_t seq [$];
    int cycles;
    bit saw_res, exp_found;
    cell_word_t exp_word;
    case (k)
      3'd1: seq = '{mk(OP_MATCH, vword(key, 0), 0), mk(OP_MARK_SEL, FREE_WORD, 0), mk(OP_INSERT, vword(val, 0), 0)};
      3'd2: seq = '{mk(OP_MATCH, vword(key, 0), 0), mk(OP_MARK_SEL, FREE_WORD, 0), mk(OP_DELETE, FREE_WORD, 0)};
      3'd3: seq = '{mk(OP_MATCH, vword(key, 0), 0), mk(OP_INDEX, FREE_WORD, n), mk(OP_READ, FREE_WORD, 0)};
      3'd4: seq = '{mk(OP_MATCH, vword(key, 0), 0), mk(OP_LAST, FREE_WORD, 0), mk(OP_READ, FREE_WORD, 0)};
      default: seq = '{raw};
    endcase
    foreach (seq[s]) begin
      ref_m.exec(seq[s]);
      case (seq[s].op)
        OP_SHIFT_R:  n_shift_r++;
        OP_SHIFT_L:  n_shift_l++;
        OP_INSERT:   n_insert++;
        OP_DELETE:   n_delete++;
        OP_MATCH:    n_match++;
        OP_MARK_SEL: n_mark++;
        OP_LAST:     n_last++;
        OP_READ:     n_read++;
        OP_INDEX: begin
          bit hit;
          hit = 0;
          for (int i = 0; i < N_CELLS; i++) hit |= ref_m.sel[i];
          if (hit) n_index_hit++; else n_index_miss++;
        end
        default: ;
      endcase
    end
    exp_found = ref_m.rsp_found;
    exp_word  = ref_m.rsp_word;
    cmd_valid = 1; cmd = k; cmd_key = VAL_W'(key); cmd_val = VAL_W'(val); cmd_n = CNT_W'(n); cmd_ins = raw;
    @(posedge clk);
    #1;
    cmd_valid = (k != 0) && ($urandom_range(0, 1) == 1);  // sometimes keep offering: must wait
    cycles = 0;
    saw_res = 0;
    while (busy) begin
      if (cmd_valid && !cmd_ready) n_stall++;
      @(posedge clk);
      #1;
      cycles++;
      if (res_valid) begin
        saw_res = 1;
        check(res_found == exp_found && (!exp_found || res_word == exp_word), "read result");
      end
    end
    cmd_valid = 0;
    check(cycles == seq.size(), $sformatf("command %0d took %0d cycles", k, cycles));
    if (k == 3 || k == 4 || raw.op == OP_READ && k == 0) begin
      if (!saw_res) begin
        @(posedge clk);  // cannot happen for list commands; a raw read answers here
        #1;
      end
      if (k == 0) check(res_valid && res_found == exp_found && (!exp_found || res_word == exp_word), "raw read result");
      else check(saw_res, "list command returned a result on its last cycle");
    end
    compare_all($sformatf("memory after command %0d", k));
  endtask

  initial begin
    ref_m = new(N_CELLS);
    rst_n = 0; cmd_valid = 0; cmd = 0; cmd_key = 0; cmd_val = 0; cmd_n = 0; cmd_ins = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // Worked example: (free a b d e), insert c after b, index 3 from a.
    run(0, 0, 0, 0, mk(OP_SHIFT_R, vword(14, 0), 0));
    run(0, 0, 0, 0, mk(OP_SHIFT_R, vword(13, 1), 0));
    run(0, 0, 0, 0, mk(OP_SHIFT_R, vword(11, 1), 0));
    run(0, 0, 0, 0, mk(OP_SHIFT_R, vword(10, 1), 0));
    run(0, 0, 0, 0, mk(OP_SHIFT_R, FREE_WORD, 0));
    run(1, 11, 12, 0, '0);
    check(cell_word[2].val == 12 && cell_word[3].val == 13, "c inserted after b");
    run(3, 10, 0, 3, '0);
    check(res_found && res_word.val == 13, "nth(a, 3) = d");
    // Load more lists from both ends, with free gaps.
    for (int l = 0; l < 6; l++) begin
      int len;
      len = $urandom_range(1, 5);
      for (int e = 0; e < len; e++) begin
        opcode_e op;
        op = (l % 2) ? OP_SHIFT_L : OP_SHIFT_R;
        run(0, 0, 0, 0, mk(op, vword(20 + 8*l + e, (op == OP_SHIFT_R) ? (e != 0) : (e != len-1)), 0));
      end
      run(0, 0, 0, 0, mk((l % 2) ? OP_SHIFT_L : OP_SHIFT_R, FREE_WORD, 0));
    end
    // Random commands on keys that mostly exist.
    for (int t = 0; t < 1500; t++) begin
      logic [2:0] k;
      int key;
      instr_t raw;
      k = 3'($urandom_range(0, 4));
      key = ref_m.word[$urandom_range(0, N_CELLS-1)].val;
      raw = mk(opcode_e'($urandom_range(0, 9)), vword($urandom_range(0, 60), 1'($urandom_range(0, 1))), $urandom_range(0, 6));
      if ($urandom_range(0, 3) == 0) raw.opd = FREE_WORD;
      run(k, key, $urandom_range(60, 90), $urandom_range(0, 6), raw);
    end
    $display("mechanisms: shift_r=%0d shift_l=%0d match=%0d mark=%0d insert=%0d delete=%0d index_hit=%0d index_miss=%0d last=%0d read=%0d stall=%0d",
             n_shift_r, n_shift_l, n_match, n_mark, n_insert, n_delete, n_index_hit, n_index_miss, n_last, n_read, n_stall);
    check(n_shift_r > 0, "shift right occurred");
    check(n_shift_l > 0, "shift left occurred");
    check(n_match > 0 && n_mark > 0, "match and mark-to-select occurred");
    check(n_insert > 0, "insert occurred");
    check(n_delete > 0, "delete occurred");
    check(n_index_hit > 0 && n_index_miss > 0, "index hit and miss occurred");
    check(n_last > 0 && n_read > 0, "last and read occurred");
    check(n_stall > 0, "a command waited while the sequencer was busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
