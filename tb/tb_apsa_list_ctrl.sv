// tb_apsa_list_ctrl -- self-checking testbench of the list-operation sequencer.
//
// Sends every command kind with random operands, records the primitives the
// sequencer issues, and checks them against the expected sequence: opcodes,
// operands, one primitive per cycle starting the cycle after acceptance,
// three cycles per list command (one for a raw instruction), and cmd_ready
// low while a command is in progress (commands offered then must wait).
module tb_apsa_list_ctrl;
  import apsa_pkg::*;

  logic             clk = 0, rst_n;
  logic             cmd_valid, cmd_ready, mem_valid, busy;
  logic [2:0]       cmd;
  logic [VAL_W-1:0] cmd_key, cmd_val;
  logic [CNT_W-1:0] cmd_n;
  instr_t           cmd_ins, mem_ins;
  int checks = 0, failures = 0, stalls = 0;

  apsa_list_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    rst_n = 0; cmd_valid = 0; cmd = 0; cmd_key = 0; cmd_val = 0; cmd_n = 0; cmd_ins = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check(cmd_ready && !mem_valid, "idle after reset");
    for (int t = 0; t < 2000; t++) begin
      logic [2:0]       k;
      logic [VAL_W-1:0] key, val;
      logic [CNT_W-1:0] n;
      instr_t           raw;
      opcode_e          exp_op [3];
      int               len;
      k   = 3'($urandom_range(0, 4));
      key = VAL_W'({$urandom, $urandom});
      val = VAL_W'({$urandom, $urandom});
      n   = CNT_W'($urandom);
      raw = {$urandom, $urandom, $urandom};
      raw.op = opcode_e'($urandom_range(0, 9));
      cmd_valid = 1; cmd = k; cmd_key = key; cmd_val = val; cmd_n = n; cmd_ins = raw;
      @(posedge clk);   // accepted here (idle)
      #1;
      // Offer the next command early; it must not be taken while busy.
      cmd = 3'($urandom_range(0, 4));
      cmd_key = ~key;
      len = (k == 0) ? 1 : 3;
      case (k)
        1, 2:    exp_op = '{OP_MATCH, OP_MARK_SEL, (k == 1) ? OP_INSERT : OP_DELETE};
        3:       exp_op = '{OP_MATCH, OP_INDEX, OP_READ};
        4:       exp_op = '{OP_MATCH, OP_LAST, OP_READ};
        default: exp_op = '{raw.op, OP_NOP, OP_NOP};
      endcase
      for (int s = 0; s < len; s++) begin
        check(mem_valid && !cmd_ready && busy, "busy during command");
        if (k == 0) check(mem_ins == raw, "raw instruction passed unchanged");
        else begin
          check(mem_ins.op == exp_op[s], $sformatf("cmd %0d step %0d opcode %s", k, s, mem_ins.op.name()));
          if (s == 0) check(mem_ins.opd.val == key && mem_ins.opd.typ == CT_VAL, "match key");
          if (s == 1 && k == 3) check(mem_ins.n == n, "index n");
          if (s == 2 && k == 1) check(mem_ins.opd.val == val, "insert value");
          if (s == 2 && k == 2) check(mem_ins.opd == FREE_WORD, "delete fills free");
        end
        if (s > 0 || len > 1) stalls++;
        @(posedge clk);
        #1;
      end
      check(cmd_ready && !mem_valid, $sformatf("idle after %0d cycles", len));
      cmd_valid = 0;
      if ($urandom_range(0, 1)) begin
        @(posedge clk);
        #1;
        check(!mem_valid, "no primitive without command");
      end
    end
    check(stalls > 0, "commands waited while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
