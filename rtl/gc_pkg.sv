// gc_pkg: shared constants, message tags and width helpers of the graph
// colouring (Latin square completion) accelerator.
//
// Two kinds of bus carry all communication:
//   * the node bus, one unidirectional toroidal ring per row and per column
//     (edge controller -> nodes -> back to the edge controller).  A word is
//     {tag, idx, data}: idx is the position of the addressed node along the
//     ring and data is a colour number (log2 N bits wide, as in the design
//     description).
//   * the edge bus, two rings through the graph master (master -> row edges
//     -> master, master -> column edges -> master).  A word is
//     {tag, row, col, data}: data is an N-bit one-hot colour list.
// The tag sets and the packing of the row/column address next to the tag are
// this implementation's choice; the description only names "a tag" and the
// data field widths.
package gc_pkg;

  // Width of a colour number / node index for an order-N square (at least 1).
  function automatic int cw(input int n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Width of a guess-depth counter: depth runs 0 .. N*N.
  function automatic int lw(input int n);
    return $clog2(n * n + 1) + 1;
  endfunction

  // Node bus word tags.
  typedef enum logic [3:0] {
    NT_NONE    = 4'd0,
    // edge -> nodes
    NT_REMOVE  = 4'd1,   // broadcast: colour data is no longer free
    NT_FILL    = 4'd2,   // to node idx: one colour of a fill packet
    NT_FILLEND = 4'd3,   // to node idx: end of fill, data[0] = complete list
    NT_GUESS   = 4'd4,   // broadcast: a guess is made; node idx guesses
    NT_STEP    = 4'd5,   // broadcast: a guess is made elsewhere (depth + 1)
    NT_QUERY   = 4'd6,   // to node idx: report whether you hold a colour
    NT_BTRK    = 4'd7,   // broadcast: undo the most recent guess
    // node -> edge
    NT_ASSIGN  = 4'd8,   // node took colour data
    NT_FILLREQ = 4'd9,   // node idx wants colours >= data
    NT_RSET    = 4'd10,  // reply to query: node idx holds colour data
    NT_RREADY  = 4'd11,  // reply to query: node idx is free to guess
    NT_BTREQ   = 4'd12   // contradiction seen: please backtrack
  } ntag_e;

  // Edge bus word tags.
  typedef enum logic [2:0] {
    ET_NONE   = 3'd0,
    ET_FILL   = 3'd1,   // colour list for node (row,col); ends at column edge col
    ET_QUERY  = 3'd2,   // master -> node (row,col), via column edge col
    ET_GUESS  = 3'd3,   // master -> all edges (push), node (row,col) guesses
    ET_BT     = 3'd4,   // master -> all edges (pop), nodes undo the last guess
    ET_RSET   = 3'd5,   // node (row,col) holds colour data[cw-1:0]
    ET_RREADY = 3'd6,   // node (row,col) can guess
    ET_BTREQ  = 3'd7    // contradiction found, towards the master
  } etag_e;

  // Width of a packed node bus word / edge bus word.
  function automatic int nbw(input int n);
    return 4 + 2 * cw(n);
  endfunction

  function automatic int ebw(input int n);
    return 3 + 2 * cw(n) + n;
  endfunction

  // Node processor assignment state.
  typedef enum logic [1:0] {
    NS_UNASSIGNED  = 2'd0,
    NS_PREASSIGNED = 2'd1,
    NS_GUESSED     = 2'd2,
    NS_IMPLIED     = 2'd3
  } nstate_e;

  // Bus focus: the node handles its column input on one cycle and its row
  // input on the next.
  typedef enum logic {
    PH_COL = 1'b0,
    PH_ROW = 1'b1
  } phase_e;

endpackage
