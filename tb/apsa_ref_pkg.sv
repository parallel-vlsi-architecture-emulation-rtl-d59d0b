// apsa_ref_pkg -- sequential reference model of the APSA memory, for testbenches.
//
// Holds the memory as plain arrays and executes one instruction at a time
// with ordinary loops: list positions are found by walking each list from its
// selected head, "selected to the right" by scanning the row. It shares only
// the type definitions with the design, not its tree logic.
package apsa_ref_pkg;
  import apsa_pkg::*;

  class apsa_ref;
    int         n;
    cell_word_t word[];
    bit         sel[];
    bit         mark[];
    bit         rsp_found;
    cell_word_t rsp_word;

    function new(int n_cells);
      n    = n_cells;
      word = new[n];
      sel  = new[n];
      mark = new[n];
      reset();
    endfunction

    function void reset();
      for (int i = 0; i < n; i++) begin
        word[i] = FREE_WORD;
        sel[i]  = 0;
        mark[i] = 0;
      end
      rsp_found = 0;
      rsp_word  = FREE_WORD;
    endfunction

    // pos[i] = element number of cell i in a list whose head is selected, -1 if none.
    function void positions(ref int pos[]);
      pos = new[n];
      for (int i = 0; i < n; i++) pos[i] = -1;
      for (int h = 0; h < n; h++) begin
        if (sel[h]) begin
          int j = h;
          int c = 0;
          while (1) begin
            if (j != h && sel[j]) break;   // a later head restarts the count
            pos[j] = c;
            if (!word[j].att || j == n-1) break;
            j++;
            c++;
          end
        end
      end
    endfunction

    function void exec(instr_t ins);
      cell_word_t nw[];
      bit         ns[], nm[];
      int         pos[];
      nw = new[n](word);
      ns = new[n](sel);
      nm = new[n](mark);
      positions(pos);
      for (int i = 0; i < n; i++) begin
        cell_word_t lw, rw;
        bit rs, anyr;
        lw = (i == 0)   ? ins.opd : word[i-1];
        rw = (i == n-1) ? ins.opd : word[i+1];
        rs = (i == n-1) ? 0 : sel[i+1];
        anyr = 0;
        for (int j = i+1; j < n; j++) anyr |= sel[j];
        case (ins.op)
          OP_MATCH:    ns[i] = (word[i].typ == CT_VAL) && (word[i].val == ins.opd.val);
          OP_MARK_SEL: nm[i] = anyr;
          OP_INSERT:
            if (sel[i]) begin
              nw[i].typ = CT_VAL;
              nw[i].val = ins.opd.val;
            end else if (mark[i]) begin
              nw[i] = rw;
              if (rs) nw[i].att = 1;
            end
          OP_DELETE:
            if (sel[i]) begin
              nw[i] = lw;
              nw[i].att = lw.att & word[i].att;
            end else if (mark[i]) nw[i] = lw;
          OP_INDEX:    ns[i] = (pos[i] >= 0) && (pos[i] == int'(ins.n));
          OP_LAST:     ns[i] = (pos[i] >= 0) && (word[i].typ == CT_VAL) && !word[i].att;
          OP_SHIFT_R:  nw[i] = lw;
          OP_SHIFT_L:  nw[i] = rw;
          default: ;
        endcase
      end
      if (ins.op == OP_READ) begin
        rsp_found = 0;
        rsp_word  = FREE_WORD;
        for (int i = 0; i < n; i++)
          if (sel[i] && !rsp_found) begin
            rsp_found = 1;
            rsp_word  = word[i];
          end
      end
      word = nw;
      sel  = ns;
      mark = nm;
    endfunction
  endclass

endpackage
