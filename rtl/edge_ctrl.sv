// edge_ctrl: edge controller of one row (ROW_EDGE=1) or one column (ROW_EDGE=0).
//
// Every row and every column of the square has one.  It owns
//   * the free-colour list: N bits, bit c = 1 while no node of its row/column
//     holds colour c;
//   * a LIFO of earlier lists (color_stack): the list is pushed when the
//     master orders a guess and popped when it orders a backtrack, which
//     returns the edge to its state before the guess;
//   * the start and end of one node bus ring (its row or its column).
// When a node reports ASSIGN(c) the edge clears bit c and broadcasts
// REMOVE(c) round its ring; if bit c was already clear two nodes of the line
// hold the same colour, and the edge sends a backtrack request (BTREQ) to
// the master instead.
//
// Memory fills, as described: the node asks its row edge; the row edge sends
// its free list, masked to colours >= the node's floor, over the edge bus.
// The list reaches the node's column edge, which intersects it with its own
// list and sends the first M colours of the result, one per word, to the node
// down the column bus, then an end word whose flag says whether the list was
// complete (at most M colours).  The master's initial presets use the same
// path, entering at the column edge with a one-colour or all-colour list.
// A row edge also forwards node replies and backtrack requests from its row
// to the master; a column edge forwards the master's query, guess and
// backtrack orders to the nodes of its column.
//
// Timing: the edge takes a node bus word on its bus focus cycle (row focus
// for a row edge, column focus for a column edge) and writes its node bus
// output on the same cycles.  Edge bus words pass through two registers, so
// each edge adds two cycles to the edge bus, as nodes do on theirs.
// Outgoing words wait in FIFOs (sync_fifo); a word arriving from the edge bus
// for this edge waits in an input FIFO and is handled in order, one node bus
// word per cycle.  The FIFO depths, the message set and the two-register
// edge bus stage are this design's choices.
module edge_ctrl
  import gc_pkg::*;
#(
  parameter int N         = 6,
  parameter int M         = 4,
  parameter bit ROW_EDGE  = 1'b1,
  parameter int IDX       = 0,
  parameter int NBQ_DEPTH = 64,
  parameter int EQ_DEPTH  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [nbw(N)-1:0] nb_in,
  output logic [nbw(N)-1:0] nb_out,
  input  logic [ebw(N)-1:0] eb_in,
  output logic [ebw(N)-1:0] eb_out,
  output logic              busy,
  output logic              err,
  output logic [N-1:0]      free_o
);
  localparam int CW  = cw(N);
  localparam int NBW = nbw(N);
  localparam int EBW = ebw(N);
  localparam int CNW = $clog2(N + 1);

  typedef struct packed {
    ntag_e         tag;
    logic [CW-1:0] idx;
    logic [CW-1:0] data;
  } nword_t;

  typedef struct packed {
    etag_e         tag;
    logic [CW-1:0] row;
    logic [CW-1:0] col;
    logic [N-1:0]  data;
  } eword_t;

  localparam nword_t NW_NONE = '{tag: NT_NONE, idx: '0, data: '0};
  localparam eword_t EW_NONE = '{tag: ET_NONE, row: '0, col: '0, data: '0};

  localparam phase_e MY_PHASE = ROW_EDGE ? PH_ROW : PH_COL;

  phase_e       phase;
  logic [N-1:0] free_l;
  nword_t       nin, nout;
  eword_t       ein, eout, eout2;
  assign nin = nword_t'(nb_in);
  assign ein = eword_t'(eb_in);

  // -------------------------------------------------------------- stack
  logic               st_push, st_pop, st_err;
  logic [N-1:0]       st_top;
  color_stack #(.N(N), .DEPTH(N * N)) u_stack (
    .clk, .rst_n, .push(st_push), .pop(st_pop), .din(free_l),
    .dout(st_top), .depth(), .err(st_err)
  );

  // -------------------------------------------------------------- FIFOs
  logic         nbq_push, nbq_pop, nbq_empty, nbq_full, nbq_ovf;
  nword_t       nbq_din, nbq_dout;
  logic         eq_push, eq_pop, eq_empty, eq_full, eq_ovf;
  eword_t       eq_din, eq_dout;
  logic         iq_push, iq_pop, iq_empty, iq_full, iq_ovf;
  eword_t       iq_dout;

  sync_fifo #(.WIDTH(NBW), .DEPTH(NBQ_DEPTH)) u_nbq (
    .clk, .rst_n, .push(nbq_push), .din(nbq_din), .pop(nbq_pop),
    .dout(nbq_dout), .empty(nbq_empty), .full(nbq_full), .overflow(nbq_ovf)
  );
  sync_fifo #(.WIDTH(EBW), .DEPTH(EQ_DEPTH)) u_eq (
    .clk, .rst_n, .push(eq_push), .din(eq_din), .pop(eq_pop),
    .dout(eq_dout), .empty(eq_empty), .full(eq_full), .overflow(eq_ovf)
  );
  sync_fifo #(.WIDTH(EBW), .DEPTH(EQ_DEPTH)) u_iq (
    .clk, .rst_n, .push(iq_push), .din(ein), .pop(iq_pop),
    .dout(iq_dout), .empty(iq_empty), .full(iq_full), .overflow(iq_ovf)
  );

  // ----------------------------------------------- edge bus input decode
  logic ein_mine, ein_pass;
  always_comb begin
    ein_mine = 1'b0;
    ein_pass = (ein.tag != ET_NONE);
    if (!ROW_EDGE) begin
      unique case (ein.tag)
        ET_FILL, ET_QUERY: if (ein.col == CW'(IDX)) begin
          ein_mine = 1'b1;
          ein_pass = 1'b0;
        end
        ET_GUESS, ET_BT: ein_mine = 1'b1;
        default: ;
      endcase
    end
  end
  assign iq_push = ein_mine;
  assign st_push = (ein.tag == ET_GUESS);
  assign st_pop  = (ein.tag == ET_BT);

  // ------------------------------------------------ node bus input handler
  logic   bus_cyc;
  logic   nb_rm_push;          // the handler writes the node bus FIFO
  logic [N-1:0] free_after;
  assign bus_cyc = (phase == MY_PHASE);

  always_comb begin
    eq_push    = 1'b0;
    eq_din     = '{tag: ET_NONE, row: '0, col: '0, data: '0};
    nb_rm_push = 1'b0;
    free_after = free_l;
    if (bus_cyc) begin
      unique case (nin.tag)
        NT_ASSIGN: begin
          if (free_l[nin.data]) begin
            free_after[nin.data] = 1'b0;
            nb_rm_push = 1'b1;
          end else begin
            eq_push = 1'b1;
            eq_din  = '{tag: ET_BTREQ, row: ROW_EDGE ? CW'(IDX) : nin.idx,
                        col: ROW_EDGE ? nin.idx : CW'(IDX), data: '0};
          end
        end
        NT_FILLREQ: if (ROW_EDGE) begin
          eq_push = 1'b1;
          eq_din  = '{tag: ET_FILL, row: CW'(IDX), col: nin.idx,
                      data: free_l & ({N{1'b1}} << nin.data)};
        end
        NT_RSET: if (ROW_EDGE) begin
          eq_push = 1'b1;
          eq_din  = '{tag: ET_RSET, row: CW'(IDX), col: nin.idx,
                      data: N'(nin.data)};
        end
        NT_RREADY: if (ROW_EDGE) begin
          eq_push = 1'b1;
          eq_din  = '{tag: ET_RREADY, row: CW'(IDX), col: nin.idx, data: '0};
        end
        NT_BTREQ: if (ROW_EDGE) begin
          eq_push = 1'b1;
          eq_din  = '{tag: ET_BTREQ, row: CW'(IDX), col: nin.idx, data: '0};
        end
        default: ;   // our own broadcasts returning round the ring end here
      endcase
    end
  end

  // ------------------------------------------ column edge: order serializer
  logic          ser_busy;
  logic [N-1:0]  ser_left;
  logic [CW-1:0] ser_row;
  logic [CNW-1:0] ser_sent;
  logic          ser_cmpl;
  logic          ser_push;
  nword_t        ser_word;
  logic [CW-1:0] low_c;
  logic          low_any;
  logic [CNW-1:0] x_cnt;
  logic [N-1:0]  x_list;

  always_comb begin
    low_c   = '0;
    low_any = 1'b0;
    for (int c = N - 1; c >= 0; c--)
      if (ser_left[c]) begin
        low_c   = CW'(c);
        low_any = 1'b1;
      end
  end

  assign x_list = iq_dout.data & free_l;
  always_comb begin
    x_cnt = '0;
    for (int c = 0; c < N; c++) x_cnt = x_cnt + CNW'(x_list[c]);
  end

  // The serializer may write the node bus FIFO only when the handler does not.
  always_comb begin
    ser_push = 1'b0;
    ser_word = '{tag: NT_NONE, idx: '0, data: '0};
    iq_pop   = 1'b0;
    if (!nb_rm_push) begin
      if (ser_busy) begin
        ser_push = 1'b1;
        if (low_any && ser_sent < CNW'(M))
          ser_word = '{tag: NT_FILL, idx: ser_row, data: low_c};
        else
          ser_word = '{tag: NT_FILLEND, idx: ser_row, data: CW'(ser_cmpl)};
      end else if (!iq_empty) begin
        iq_pop = 1'b1;
        unique case (iq_dout.tag)
          ET_QUERY: begin
            ser_push = 1'b1;
            ser_word = '{tag: NT_QUERY, idx: iq_dout.row, data: '0};
          end
          ET_GUESS: begin
            ser_push = 1'b1;
            ser_word = (iq_dout.col == CW'(IDX)) ?
                       '{tag: NT_GUESS, idx: iq_dout.row, data: '0} :
                       '{tag: NT_STEP,  idx: '0,          data: '0};
          end
          ET_BT: begin
            ser_push = 1'b1;
            ser_word = '{tag: NT_BTRK, idx: '0, data: '0};
          end
          default: ;   // ET_FILL starts the serializer below
        endcase
      end
    end
  end

  assign nbq_push = nb_rm_push || ser_push;
  nword_t rm_word;
  assign rm_word  = '{tag: NT_REMOVE, idx: '0, data: nin.data};
  assign nbq_din  = nb_rm_push ? rm_word : ser_word;

  // node bus output: one queued word per bus focus cycle
  assign nbq_pop = bus_cyc && !nbq_empty;
  // edge bus output: pass-through first, then our own words
  assign eq_pop  = !ein_pass && !eq_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_COL;
      free_l   <= '1;
      nout     <= '{tag: NT_NONE, idx: '0, data: '0};
      eout     <= '{tag: ET_NONE, row: '0, col: '0, data: '0};
      eout2    <= '{tag: ET_NONE, row: '0, col: '0, data: '0};
      ser_busy <= 1'b0;
      ser_left <= '0;
      ser_row  <= '0;
      ser_sent <= '0;
      ser_cmpl <= 1'b0;
    end else begin
      phase <= (phase == PH_COL) ? PH_ROW : PH_COL;
      // free list: a backtrack restores the pushed list, otherwise ASSIGN
      if (st_pop) free_l <= st_top;
      else        free_l <= free_after;
      if (bus_cyc)
        nout <= nbq_empty ? NW_NONE : nbq_dout;
      eout <= ein_pass ? ein :
              (!eq_empty ? eq_dout : EW_NONE);
      eout2 <= eout;
      // fill serializer
      if (!nb_rm_push) begin
        if (ser_busy) begin
          if (low_any && ser_sent < CNW'(M)) begin
            ser_left[low_c] <= 1'b0;
            ser_sent        <= ser_sent + 1'b1;
          end else begin
            ser_busy <= 1'b0;
          end
        end else if (!iq_empty && iq_dout.tag == ET_FILL) begin
          ser_busy <= 1'b1;
          ser_left <= x_list;
          ser_row  <= iq_dout.row;
          ser_sent <= '0;
          ser_cmpl <= (x_cnt <= CNW'(M));
        end
      end
    end
  end

  assign nb_out = nout;
  assign eb_out = eout2;
  assign free_o = free_l;
  assign busy   = !nbq_empty || !eq_empty || !iq_empty || ser_busy
               || (nout.tag != NT_NONE) || (eout.tag != ET_NONE)
               || (eout2.tag != ET_NONE);
  assign err    = nbq_ovf || eq_ovf || iq_ovf || st_err;

endmodule
