// Shared types of the order-preserving MIMO buffer.
//
// Every link inside the balanced distribution network (BDN) carries one data word
// per clock plus a small control record. A cell occupies CELL_WORDS consecutive words;
// its first word is flagged with `sop`, and the cell's kind is read only on that word.
// The document marks a cell valid or empty with one header bit. This design adds a third
// kind, RESV, which the vertical controller puts at the top of the columns that lie before
// the current round-robin position. A main-row switch treats RESV as occupied and a
// wrap-row switch treats it as free, and that is how the cyclic shift is done.
package mimo_pkg;

  typedef enum logic [1:0] {
    TK_EMPTY = 2'd0,  // empty cell (a free slot on a column, or an idle input)
    TK_RESV  = 2'd1,  // slot held back for the wrap-around pass
    TK_CELL  = 2'd2   // valid cell
  } tok_e;

  typedef struct packed {
    logic sop;   // first word of a cell
    tok_e kind;  // meaningful when sop = 1
  } ctl_t;

  localparam ctl_t CTL_IDLE = '{sop: 1'b0, kind: TK_EMPTY};

endpackage
