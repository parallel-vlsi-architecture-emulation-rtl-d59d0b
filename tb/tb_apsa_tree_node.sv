// tb_apsa_tree_node -- self-checking testbench of one sweep-tree node.
//
// Drives random child summaries and parent contexts and checks each output
// field against its meaning: OR of the select bits, leftmost selected word,
// "selected to the right" for each child, and, for the position-carry
// functions, that the node's composed function applied to a carry equals the
// right child's function applied after the left child's (evaluated by this
// testbench's own interpreter of the function encoding).
module tb_apsa_tree_node;
  import apsa_pkg::*;

  up_t l_up, r_up, up;
  dn_t ctx, l_ctx, r_ctx;
  int  checks = 0, failures = 0;
  logic clk = 0;

  apsa_tree_node dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Evaluate a carry function on a carry: returns -1 for "no carry".
  function automatic int run_fn(pos_fn_t f, int c);
    if (f.cnst) return f.vld ? int'(f.k) : -1;
    return (c < 0) ? -1 : c + int'(f.k);
  endfunction

  function automatic pos_fn_t rnd_fn();
    pos_fn_t f;
    f.cnst = 1'($urandom_range(0, 1));
    f.vld  = f.cnst ? 1'($urandom_range(0, 1)) : 1'b0;
    f.k    = (f.cnst && !f.vld) ? '0 : CNT_W'($urandom_range(0, 200));
    return f;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int c_in;
      l_up.any_sel    = 1'($urandom_range(0, 1));
      r_up.any_sel    = 1'($urandom_range(0, 1));
      l_up.first_word = {$urandom, $urandom};
      r_up.first_word = {$urandom, $urandom};
      l_up.fn         = rnd_fn();
      r_up.fn         = rnd_fn();
      ctx.sel_right   = 1'($urandom_range(0, 1));
      ctx.cin.vld     = 1'($urandom_range(0, 1));
      ctx.cin.k       = ctx.cin.vld ? CNT_W'($urandom_range(0, 200)) : '0;
      c_in            = ctx.cin.vld ? int'(ctx.cin.k) : -1;
      @(posedge clk);
      check(up.any_sel == (l_up.any_sel || r_up.any_sel), "any_sel");
      if (l_up.any_sel) check(up.first_word == l_up.first_word, "first word from left");
      else if (r_up.any_sel) check(up.first_word == r_up.first_word, "first word from right");
      for (int c = -1; c < 5; c++)
        check(run_fn(up.fn, c) == run_fn(r_up.fn, run_fn(l_up.fn, c)), "composed carry function");
      check(l_ctx.sel_right == (ctx.sel_right || r_up.any_sel), "left child sel_right");
      check(r_ctx.sel_right == ctx.sel_right, "right child sel_right");
      check((l_ctx.cin.vld ? int'(l_ctx.cin.k) : -1) == c_in, "left child carry");
      check((r_ctx.cin.vld ? int'(r_ctx.cin.k) : -1) == run_fn(l_up.fn, c_in), "right child carry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
