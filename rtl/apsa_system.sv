// apsa_system -- APSA memory with its list-operation sequencer (design top).
//
// The applicative-language interpreter that drives the memory sits outside
// this design; it reaches the memory through the command port of
// apsa_list_ctrl, which turns each list command into the one-cycle memory
// primitives described there, and gets read results back from the memory's
// response port. The whole memory is visible on the cell_* outputs.
//
// Default size: 2**14 = 16,384 cells of 64-bit words, the largest memory of
// the source architecture (one cell per processing element of a 128 x 128
// array). Timing: see apsa_list_ctrl (commands) and apsa_memory (responses).
module apsa_system
  import apsa_pkg::*;
#(
  parameter int LEVELS  = 14,
  parameter int N_CELLS = 2**LEVELS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  logic [2:0]       cmd,
  input  logic [VAL_W-1:0] cmd_key,
  input  logic [VAL_W-1:0] cmd_val,
  input  logic [CNT_W-1:0] cmd_n,
  input  instr_t           cmd_ins,
  output logic             res_valid,
  output logic             res_found,
  output cell_word_t       res_word,
  output logic             any_sel,
  output logic             busy,       // sequencer is in the middle of a command
  output logic             mem_valid,  // a primitive is issued this cycle
  output instr_t           mem_ins,    // the primitive issued this cycle
  output cell_word_t       cell_word [N_CELLS],
  output logic             cell_sel  [N_CELLS],
  output logic             cell_mark [N_CELLS]
);

  apsa_list_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmd_valid (cmd_valid),
    .cmd_ready (cmd_ready),
    .cmd       (cmd),
    .cmd_key   (cmd_key),
    .cmd_val   (cmd_val),
    .cmd_n     (cmd_n),
    .cmd_ins   (cmd_ins),
    .mem_valid (mem_valid),
    .mem_ins   (mem_ins),
    .busy      (busy)
  );

  apsa_memory #(.LEVELS(LEVELS), .N_CELLS(N_CELLS)) u_mem (
    .clk       (clk),
    .rst_n     (rst_n),
    .ins_valid (mem_valid),
    .ins       (mem_ins),
    .rsp_valid (res_valid),
    .rsp_found (res_found),
    .rsp_word  (res_word),
    .any_sel   (any_sel),
    .cell_word (cell_word),
    .cell_sel  (cell_sel),
    .cell_mark (cell_mark)
  );

endmodule
