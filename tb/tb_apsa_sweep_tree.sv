// tb_apsa_sweep_tree -- self-checking testbench of the sweep tree.
//
// A 32-leaf tree (LEVELS = 5) gets random, realistic leaf summaries built from
// random select and attached bits, exactly as cells form them. Checked
// against direct scans over the leaves: root select-OR, root leftmost
// selected word, each leaf's "selected to the right" bit, and each leaf's
// position carry, which must equal the element number of the next cell in a
// list walked from its selected head.
module tb_apsa_sweep_tree;
  import apsa_pkg::*;

  localparam int LEVELS = 5;
  localparam int N      = 2**LEVELS;

  up_t leaf_up  [N];
  dn_t leaf_ctx [N];
  up_t root_up;
  dn_t root_ctx;
  logic clk = 0;
  int checks = 0, failures = 0;

  apsa_sweep_tree #(.LEVELS(LEVELS)) dut (.*);

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
    bit sel[N], att[N];
    logic [63:0] w[N];
    root_ctx = '0;
    for (int t = 0; t < 2000; t++) begin
      int first;
      int exp_c [N];
      for (int j = 0; j < N; j++) begin
        sel[j] = ($urandom_range(0, 5) == 0);
        att[j] = ($urandom_range(0, 4) != 0);
        w[j]   = {$urandom, $urandom};
        leaf_up[j].any_sel    = sel[j];
        leaf_up[j].first_word = w[j];
        leaf_up[j].fn.cnst    = !att[j] || sel[j];
        leaf_up[j].fn.vld     = att[j] && sel[j];
        leaf_up[j].fn.k       = att[j] ? CNT_W'(1) : '0;
      end
      // Expected carry into each cell: walk each list from its head.
      for (int j = 0; j < N; j++) exp_c[j] = -1;
      for (int h = 0; h < N; h++)
        if (sel[h]) begin
          int j;
          j = h;
          while (att[j] && j+1 < N) begin
            exp_c[j+1] = j + 1 - h;
            if (sel[j+1]) break;
            j++;
          end
        end
      first = -1;
      for (int j = N-1; j >= 0; j--) if (sel[j]) first = j;
      @(posedge clk);
      check(root_up.any_sel == (first >= 0), "root any_sel");
      if (first >= 0) check(root_up.first_word == w[first], "root leftmost selected word");
      for (int j = 0; j < N; j++) begin
        bit r;
        r = 0;
        for (int k = j+1; k < N; k++) r |= sel[k];
        check(leaf_ctx[j].sel_right == r, $sformatf("sel_right leaf %0d", j));
        check((leaf_ctx[j].cin.vld ? int'(leaf_ctx[j].cin.k) : -1) == exp_c[j], $sformatf("carry leaf %0d sel %0d att %0d exp %0d got %0d/%0d", j, sel[j], att[j], exp_c[j], leaf_ctx[j].cin.vld, leaf_ctx[j].cin.k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
