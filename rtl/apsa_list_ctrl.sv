// apsa_list_ctrl -- list-operation sequencer of the APSA memory controller.
//
// The memory executes one primitive instruction per cycle; list operations are
// short fixed sequences of primitives, so their cost does not depend on where
// in the list they act. This block accepts one command at a time
// (cmd_valid/cmd_ready handshake) and issues its primitives on consecutive
// cycles:
//   CMD_RAW           the instruction in cmd_ins                        1 cycle
//   CMD_INSERT_AFTER  match key; mark-to-select; insert val            3 cycles
//   CMD_DELETE        match key; mark-to-select; delete (free fill)     3 cycles
//   CMD_NTH           match key; index n; read                          3 cycles
//   CMD_LAST          match key; last; read                             3 cycles
// cmd_ready is high when idle; a command accepted at edge t issues its first
// primitive in the cycle after t. For CMD_NTH and CMD_LAST the memory's read
// response (res_valid, res_found, res_word) appears one cycle after the read
// is issued. A raw OP_READ returns its response the same way.
//
// The insert sequence and the index-after-match usage follow the source
// architecture's worked example; the command set, the read step, the delete
// and last sequences and the handshake are this implementation's choices.
module apsa_list_ctrl
  import apsa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  logic [2:0]       cmd,
  input  logic [VAL_W-1:0] cmd_key,   // value that identifies the list position
  input  logic [VAL_W-1:0] cmd_val,   // value to insert
  input  logic [CNT_W-1:0] cmd_n,     // element number for CMD_NTH
  input  instr_t           cmd_ins,   // instruction for CMD_RAW
  // Instruction port of the memory.
  output logic             mem_valid,
  output instr_t           mem_ins,
  output logic             busy
);

  localparam logic [2:0] CMD_RAW          = 3'd0;
  localparam logic [2:0] CMD_INSERT_AFTER = 3'd1;
  localparam logic [2:0] CMD_DELETE       = 3'd2;
  localparam logic [2:0] CMD_NTH          = 3'd3;
  localparam logic [2:0] CMD_LAST         = 3'd4;

  typedef enum logic [1:0] {S_IDLE, S_STEP0, S_STEP1, S_STEP2} state_e;

  state_e           state;
  logic [2:0]       c_cmd;
  logic [VAL_W-1:0] c_key, c_val;
  logic [CNT_W-1:0] c_n;
  instr_t           c_ins;

  assign cmd_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      c_cmd <= CMD_RAW;
      c_key <= '0;
      c_val <= '0;
      c_n   <= '0;
      c_ins <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          state <= S_STEP0;
          c_cmd <= cmd;
          c_key <= cmd_key;
          c_val <= cmd_val;
          c_n   <= cmd_n;
          c_ins <= cmd_ins;
        end
        S_STEP0: state <= (c_cmd == CMD_RAW) ? S_IDLE : S_STEP1;
        S_STEP1: state <= S_STEP2;
        S_STEP2: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_valid = 1'b0;
    mem_ins   = '0;
    mem_ins.opd.typ = CT_VAL;
    mem_ins.opd.val = c_key;
    unique case (state)
      S_STEP0: begin
        mem_valid  = 1'b1;
        mem_ins.op = OP_MATCH;
        if (c_cmd == CMD_RAW) mem_ins = c_ins;
      end
      S_STEP1: begin
        mem_valid = 1'b1;
        unique case (c_cmd)
          CMD_INSERT_AFTER, CMD_DELETE: mem_ins.op = OP_MARK_SEL;
          CMD_NTH: begin
            mem_ins.op = OP_INDEX;
            mem_ins.n  = c_n;
          end
          CMD_LAST: mem_ins.op = OP_LAST;
          default:  mem_ins.op = OP_NOP;
        endcase
      end
      S_STEP2: begin
        mem_valid = 1'b1;
        unique case (c_cmd)
          CMD_INSERT_AFTER: begin
            mem_ins.op      = OP_INSERT;
            mem_ins.opd.val = c_val;
          end
          CMD_DELETE: begin
            mem_ins.op  = OP_DELETE;
            mem_ins.opd = FREE_WORD;
          end
          default: mem_ins.op = OP_READ;
        endcase
      end
      default: ;
    endcase
  end

endmodule
