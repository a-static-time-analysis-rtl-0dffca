// sca_model_pkg: cycle-level reference model of an SCA scan structure, used
// by the structure and top-level testbenches.
//
// The model is written from the register mode tables, not from the RTL: it
// keeps every register value, the page-select register, the address
// sequencer and (for PIPE = 1) the input and output pipeline registers.
// eval() gives the value expected on psso before the next clock edge;
// clock() advances the state over one rising edge. Inputs are passed as a
// struct sampled just before the edge. With PIPE = 1 psso lags the page
// outputs by xlat register stages of the XOR tree.
package sca_model_pkg;

  typedef enum int {STYLE_SCAH, STYLE_SCAS, STYLE_GSCAS} style_e;

  class sca_model #(int unsigned SW = 4, int unsigned SD = 5, int unsigned PAGES = 3);

    typedef struct {
      bit                           gse;
      int unsigned                  add;
      bit                           seq_start;
      bit                           page_we;
      int unsigned                  page_idx;
      bit                           page_en;
      bit [SW-1:0]                  si;
      bit [PAGES-1:0][SD:1]         ce;
      bit [PAGES-1:0][SD:1][SW-1:0] di;
    } in_t;

    style_e style;
    bit     pipe;

    bit [PAGES-1:0][SD:1][SW-1:0] mem;
    bit [PAGES-1:0]               psel;
    int unsigned                  cnt;      // sequencer address, 0 = idle
    bit [SD:1]                    ls_q;
    bit [SW-1:0]                  si_q;
    bit                           gse_q;
    bit [SW-1:0]                  psso_q [8];  // XOR-tree register stages
    int unsigned                  xlat;         // number of those stages

    function new(style_e s, bit p, int unsigned xl = 1);
      style = s;
      pipe  = p;
      xlat  = xl;
      reset();
    endfunction

    function void reset();
      mem = '0; psel = '0; cnt = 0; ls_q = '0; si_q = '0; gse_q = 0;
      foreach (psso_q[k]) psso_q[k] = '0;
    endfunction

    function bit busy();
      return cnt != 0;
    endfunction

    // Line selects decoded from the current inputs (before any pipeline).
    function bit [SD:1] decode(in_t i);
      int unsigned a;
      bit [SD:1] r;
      a = (cnt != 0) ? cnt : i.add;
      r = '0;
      if (a >= 1 && a <= SD) r[a] = 1'b1;
      return r;
    endfunction

    // Scan-in entering line l of page p for the page-level signals given.
    function bit [SW-1:0] chain_in(int p, int l, bit [SD:1] ls, bit [SW-1:0] si);
      bit [SW-1:0] c;
      c = psel[p] ? si : '0;
      for (int k = 1; k < l; k++) if (ls[k] && psel[p]) c = mem[p][k];
      return c;
    endfunction

    function bit [SW-1:0] comb_psso(in_t i);
      bit [SD:1] ls; bit [SW-1:0] si; bit [SW-1:0] r;
      ls = pipe ? ls_q : decode(i);
      si = pipe ? si_q : i.si;
      r = '0;
      for (int p = 0; p < PAGES; p++) r ^= chain_in(p, SD + 1, ls, si);
      return r;
    endfunction

    function bit [SW-1:0] eval(in_t i);
      return pipe ? psso_q[xlat-1] : comb_psso(i);
    endfunction

    function void clock(in_t i);
      bit [SD:1] ls; bit [SW-1:0] si; bit gse; bit sel; bit clocked;
      bit [PAGES-1:0][SD:1][SW-1:0] nxt;
      bit [SW-1:0] cin;
      ls  = pipe ? ls_q  : decode(i);
      si  = pipe ? si_q  : i.si;
      gse = pipe ? gse_q : i.gse;
      nxt = mem;
      for (int p = 0; p < PAGES; p++) begin
        for (int l = 1; l <= SD; l++) begin
          sel = ls[l] && psel[p];
          cin = chain_in(p, l, ls, si);
          case (style)
            STYLE_SCAH:  nxt[p][l] = gse ? (sel ? cin : mem[p][l]) : i.di[p][l];
            STYLE_SCAS:  nxt[p][l] = sel ? cin : i.di[p][l];
            default: begin
              clocked = gse ? sel : i.ce[p][l];
              if (clocked) nxt[p][l] = sel ? cin : i.di[p][l];
            end
          endcase
        end
      end
      // pipeline registers take their pre-edge inputs
      for (int k = 7; k > 0; k--) psso_q[k] = psso_q[k-1];
      psso_q[0] = comb_psso(i);
      ls_q   = decode(i);
      si_q   = i.si;
      gse_q  = i.gse;
      mem    = nxt;
      if (i.page_we) begin
        psel = '0;
        if (i.page_en && i.page_idx < PAGES) psel[i.page_idx] = 1'b1;
      end
      if (i.seq_start)    cnt = 1;
      else if (cnt == SD) cnt = 0;
      else if (cnt != 0)  cnt = cnt + 1;
    endfunction

  endclass

endpackage
