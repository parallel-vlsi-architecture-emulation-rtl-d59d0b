// apsa_memory -- the APSA data-structure memory: cells, neighbour paths and
// sweep tree.
//
// N_CELLS cells form a linear address space (cell 0 is the leftmost). Each
// cell is wired to both neighbours, so a shift moves words one place in a
// single cycle, and all cells are the leaves of one combinational binary tree
// (apsa_sweep_tree) whose root is this module's controller port. Every
// instruction is a single-cycle operation: the controller presents it on ins
// with ins_valid, the tree sweeps up and down combinationally, and all cells
// update at the next rising edge. The ends of the row connect to the
// controller: on a right shift (or delete) cell 0 takes ins.opd, on a left
// shift the last cell does.
//
// Controller port outputs, registered at the edge that ends each instruction:
//   rsp_valid  one cycle after an OP_READ
//   rsp_found  some cell was selected when the read was issued
//   rsp_word   word of the leftmost selected cell (free word if none)
//   any_sel    some cell was selected before the last instruction (every cycle)
// The cell/tree/neighbour organisation and its 16,384-cell size follow the
// source architecture; the port protocol and the registered response are
// this implementation's choices. Active-low synchronous reset empties every
// cell.
module apsa_memory
  import apsa_pkg::*;
#(
  parameter int LEVELS  = 14,
  parameter int N_CELLS = 2**LEVELS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ins_valid,
  input  instr_t     ins,
  output logic       rsp_valid,
  output logic       rsp_found,
  output cell_word_t rsp_word,
  output logic       any_sel,
  // Cell contents, for observation and debugging.
  output cell_word_t cell_word [N_CELLS],
  output logic       cell_sel  [N_CELLS],
  output logic       cell_mark [N_CELLS]
);

  instr_t ins_eff;
  up_t    leaf_up  [N_CELLS];
  dn_t    leaf_ctx [N_CELLS];
  up_t    root_up;
  dn_t    root_ctx;

  always_comb begin
    ins_eff = ins;
    if (!ins_valid) ins_eff.op = OP_NOP;
  end

  assign root_ctx = '{cin: '{vld: 1'b0, k: '0}, sel_right: 1'b0};

  apsa_sweep_tree #(.LEVELS(LEVELS), .N_CELLS(N_CELLS)) u_tree (
    .leaf_up  (leaf_up),
    .leaf_ctx (leaf_ctx),
    .root_up  (root_up),
    .root_ctx (root_ctx)
  );

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    cell_word_t lw, rw;
    logic       rs;
    if (i == 0) begin : g_first
      assign lw = ins_eff.opd;
    end else begin : g_mid_l
      assign lw = cell_word[i-1];
    end
    if (i == N_CELLS-1) begin : g_last
      assign rw = ins_eff.opd;
      assign rs = 1'b0;
    end else begin : g_mid_r
      assign rw = cell_word[i+1];
      assign rs = cell_sel[i+1];
    end

    apsa_cell u_cell (
      .clk        (clk),
      .rst_n      (rst_n),
      .ins        (ins_eff),
      .left_word  (lw),
      .right_word (rw),
      .right_sel  (rs),
      .ctx        (leaf_ctx[i]),
      .leaf_up    (leaf_up[i]),
      .word       (cell_word[i]),
      .sel        (cell_sel[i]),
      .mark       (cell_mark[i])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_found <= 1'b0;
      rsp_word  <= FREE_WORD;
      any_sel   <= 1'b0;
    end else begin
      rsp_valid <= (ins_eff.op == OP_READ);
      any_sel   <= root_up.any_sel;
      if (ins_eff.op == OP_READ) begin
        rsp_found <= root_up.any_sel;
        rsp_word  <= root_up.any_sel ? root_up.first_word : FREE_WORD;
      end
    end
  end

endmodule
