// node_proc: one node processor of the N x N array (one per Latin square cell).
//
// The node holds a subset of the colours still possible for its cell in M
// bins (colour + valid bit) with a complete-list flag telling whether the
// bins hold every possible colour or only the first M of them.  It sits on
// two unidirectional node buses: the row bus (Right In -> Right Out, towards
// the row edge controller) and the column bus (Down In -> Down Out, towards
// the column edge controller).  As in the description, a node
//   * removes a colour from its bins when an edge broadcasts REMOVE,
//   * implicates when the list is complete and one colour is left, and then
//     sends ASSIGN to both of its edge controllers,
//   * requests a backtrack when the list is complete and empty,
//   * requests a memory fill from its row edge when a partial list runs dry,
//   * guesses its lowest held colour when the master orders it to,
//   * passes every bus word it does not consume to the next node, and only
//     writes a request of its own into an idle bus slot.
//
// Bus focus: a local phase bit alternates.  On a column-focus cycle the node
// takes the word on Down In and writes Down Out; on a row-focus cycle it
// takes Right In and writes Right Out.  A word therefore spends two cycles at
// each node, the pass-through latency the description reports.
//
// This design's own choices (the description gives only the behaviour above):
//   * the node keeps its guess depth (incremented by every GUESS/STEP word,
//     decremented by BTRK) and the depth at which it was assigned, so that a
//     backtrack can undo exactly the assignments made since the last guess;
//   * a node whose guess is undone keeps a floor (its guessed colour + 1):
//     its refills and next guess only use colours at or above the floor, so
//     colours are tried in ascending order and the search stays complete;
//   * after a backtrack every unassigned node empties its bins and refills.
//
// Parameters: N (order of the square), M (bin depth), ROW/COL (the node's
// position; ROW is its index on the column bus, COL on the row bus).
module node_proc
  import gc_pkg::*;
#(
  parameter int N   = 6,
  parameter int M   = 4,
  parameter int ROW = 0,
  parameter int COL = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [nbw(N)-1:0]    right_in,
  output logic [nbw(N)-1:0]    right_out,
  input  logic [nbw(N)-1:0]    down_in,
  output logic [nbw(N)-1:0]    down_out,
  output logic                 busy,
  // observation of the node's state (used by the top for statistics)
  output nstate_e              state_o,
  output logic [cw(N)-1:0]     color_o
);
  localparam int CW = cw(N);
  localparam int LW = lw(N);
  localparam int PW = (M > 1) ? $clog2(M) : 1;

  typedef struct packed {
    ntag_e         tag;
    logic [CW-1:0] idx;
    logic [CW-1:0] data;
  } nword_t;

  // ---------------------------------------------------------------- state
  phase_e                  phase;
  logic [M-1:0]            bin_v;
  logic [M-1:0][CW-1:0]    bin_c;
  logic                    complete;
  logic [PW:0]             wr_ptr;
  logic                    fill_pending, loaded, bt_sent;
  nstate_e                 state;
  logic [CW-1:0]           color;
  logic [LW-1:0]           level, depth;
  logic [CW:0]             floor_c;
  logic                    p_asg_r, p_asg_c, p_fill, p_bt, p_reply;
  nword_t                  rout, dout;

  // values after the bus word of this cycle has been applied
  logic [M-1:0]            a_bin_v;
  logic [M-1:0][CW-1:0]    a_bin_c;
  logic                    a_complete, a_fill_pending, a_loaded, a_bt_sent;
  logic [PW:0]             a_wr_ptr;
  nstate_e                 a_state;
  logic [CW-1:0]           a_color;
  logic [LW-1:0]           a_level, a_depth;
  logic [CW:0]             a_floor;
  logic                    a_asg_r, a_asg_c, a_fill, a_bt, a_reply;
  nword_t                  a_rout, a_dout;

  // final next-state values
  logic [M-1:0]            n_bin_v;
  logic                    n_complete, n_fill_pending, n_bt_sent;
  logic [PW:0]             n_wr_ptr;
  nstate_e                 n_state;
  logic [CW-1:0]           n_color;
  logic [LW-1:0]           n_level;
  logic                    n_asg_r, n_asg_c, n_fill, n_bt;

  nword_t                  rin, din;
  assign rin = nword_t'(right_in);
  assign din = nword_t'(down_in);

  // guess decision uses the bins as they stand before this cycle's word
  logic [$clog2(M+1)-1:0]  cur_cnt, a_cnt;
  logic                    cur_any, a_any;
  logic [CW-1:0]           cur_sel, a_sel;
  logic                    a_imp, a_btk, a_need;
  logic                    ctrl_en;

  implicate_ctrl #(.N(N), .M(M)) u_cur (
    .enable(1'b0), .valid(bin_v), .colors(bin_c), .complete(complete),
    .count(cur_cnt), .any_valid(cur_any), .sel_color(cur_sel),
    .implicate(), .backtrack(), .need_fill()
  );

  assign ctrl_en = a_loaded && (a_state == NS_UNASSIGNED) && !a_fill_pending;

  implicate_ctrl #(.N(N), .M(M)) u_ctrl (
    .enable(ctrl_en), .valid(a_bin_v), .colors(a_bin_c), .complete(a_complete),
    .count(a_cnt), .any_valid(a_any), .sel_color(a_sel),
    .implicate(a_imp), .backtrack(a_btk), .need_fill(a_need)
  );

  // ------------------------------------------- step 1: apply the bus word
  always_comb begin
    nword_t w;
    logic   consumed;
    a_bin_v = bin_v;   a_bin_c = bin_c;   a_complete = complete;
    a_fill_pending = fill_pending;  a_loaded = loaded;  a_bt_sent = bt_sent;
    a_wr_ptr = wr_ptr; a_state = state;   a_color = color;
    a_level = level;   a_depth = depth;   a_floor = floor_c;
    a_asg_r = p_asg_r; a_asg_c = p_asg_c; a_fill = p_fill;
    a_bt = p_bt;       a_reply = p_reply;
    a_rout = rout;     a_dout = dout;
    consumed = 1'b0;
    w = (phase == PH_ROW) ? rin : din;

    // colour removal is the same from either bus
    if (w.tag == NT_REMOVE && state == NS_UNASSIGNED) begin
      for (int b = 0; b < M; b++)
        if (bin_c[b] == w.data) a_bin_v[b] = 1'b0;
    end

    if (phase == PH_COL) begin
      unique case (w.tag)
        NT_FILL: if (w.idx == CW'(ROW)) begin
          consumed = 1'b1;
          if (state == NS_UNASSIGNED && a_wr_ptr < (PW+1)'(M)) begin
            a_bin_c[a_wr_ptr[PW-1:0]] = w.data;
            a_bin_v[a_wr_ptr[PW-1:0]] = 1'b1;
            a_wr_ptr = a_wr_ptr + 1'b1;
          end
        end
        NT_FILLEND: if (w.idx == CW'(ROW)) begin
          consumed       = 1'b1;
          a_complete     = w.data[0];
          a_fill_pending = 1'b0;
          a_loaded       = 1'b1;
          a_bt_sent      = 1'b0;
        end
        NT_GUESS, NT_STEP: begin
          a_depth = depth + 1'b1;
          if (w.tag == NT_GUESS && w.idx == CW'(ROW)) begin
            if (state == NS_UNASSIGNED && cur_any) begin
              a_state = NS_GUESSED;
              a_color = cur_sel;
              a_level = depth + 1'b1;
              a_asg_r = 1'b1;
              a_asg_c = 1'b1;
            end else begin
              a_bt = 1'b1;
            end
          end
        end
        NT_QUERY: if (w.idx == CW'(ROW)) begin
          consumed = 1'b1;
          a_reply  = 1'b1;
        end
        NT_BTRK: begin
          a_depth = depth - 1'b1;
          if (state != NS_UNASSIGNED && level >= depth) begin
            a_floor = (state == NS_GUESSED) ? (CW+1)'(color) + 1'b1 : '0;
            a_state = NS_UNASSIGNED;
          end else if (state == NS_UNASSIGNED) begin
            a_floor = '0;
          end
          if (a_state == NS_UNASSIGNED) begin
            a_bin_v        = '0;
            a_complete     = 1'b0;
            a_wr_ptr       = '0;
            a_fill_pending = 1'b0;
            a_bt_sent      = 1'b0;
            a_fill         = 1'b0;
            a_bt           = 1'b0;
          end
        end
        default: ;
      endcase

      // column bus output: pass through, else send our ASSIGN
      if (w.tag != NT_NONE && !consumed) begin
        a_dout = w;
      end else if (p_asg_c) begin
        a_dout  = '{tag: NT_ASSIGN, idx: CW'(ROW), data: color};
        a_asg_c = 1'b0;
      end else begin
        a_dout = '{tag: NT_NONE, idx: '0, data: '0};
      end
    end else begin
      // row bus output: pass through, else the most urgent own request
      if (w.tag != NT_NONE) begin
        a_rout = w;
      end else if (p_bt) begin
        a_rout = '{tag: NT_BTREQ, idx: CW'(COL), data: '0};
        a_bt   = 1'b0;
      end else if (p_asg_r) begin
        a_rout  = '{tag: NT_ASSIGN, idx: CW'(COL), data: color};
        a_asg_r = 1'b0;
      end else if (p_reply) begin
        a_rout  = (state == NS_UNASSIGNED) ?
                  '{tag: NT_RREADY, idx: CW'(COL), data: '0} :
                  '{tag: NT_RSET,   idx: CW'(COL), data: color};
        a_reply = 1'b0;
      end else if (p_fill) begin
        a_rout = '{tag: NT_FILLREQ, idx: CW'(COL), data: floor_c[CW-1:0]};
        a_fill = 1'b0;
      end else begin
        a_rout = '{tag: NT_NONE, idx: '0, data: '0};
      end
    end
  end

  // ------------------------------- step 2: implicate / backtrack / refill
  always_comb begin
    n_bin_v = a_bin_v;   n_complete = a_complete;  n_fill_pending = a_fill_pending;
    n_bt_sent = a_bt_sent;  n_wr_ptr = a_wr_ptr;   n_state = a_state;
    n_color = a_color;   n_level = a_level;
    n_asg_r = a_asg_r;   n_asg_c = a_asg_c;  n_fill = a_fill;  n_bt = a_bt;
    if (a_imp) begin
      n_state = (a_depth == '0) ? NS_PREASSIGNED : NS_IMPLIED;
      n_color = a_sel;
      n_level = a_depth;
      n_asg_r = 1'b1;
      n_asg_c = 1'b1;
    end else if (a_btk) begin
      if (!a_bt_sent) begin
        n_bt      = 1'b1;
        n_bt_sent = 1'b1;
      end
    end else if (a_need) begin
      if (a_floor < (CW+1)'(N)) begin
        n_fill         = 1'b1;
        n_fill_pending = 1'b1;
        n_wr_ptr       = '0;
        n_bin_v        = '0;
      end else begin
        n_complete = 1'b1;   // every colour above the floor is used up
      end
    end
  end

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase        <= PH_COL;
      bin_v        <= '0;
      bin_c        <= '0;
      complete     <= 1'b0;
      wr_ptr       <= '0;
      fill_pending <= 1'b0;
      loaded       <= 1'b0;
      bt_sent      <= 1'b0;
      state        <= NS_UNASSIGNED;
      color        <= '0;
      level        <= '0;
      depth        <= '0;
      floor_c      <= '0;
      p_asg_r      <= 1'b0;
      p_asg_c      <= 1'b0;
      p_fill       <= 1'b0;
      p_bt         <= 1'b0;
      p_reply      <= 1'b0;
      rout         <= '{tag: NT_NONE, idx: '0, data: '0};
      dout         <= '{tag: NT_NONE, idx: '0, data: '0};
    end else begin
      phase        <= (phase == PH_COL) ? PH_ROW : PH_COL;
      bin_v        <= n_bin_v;
      bin_c        <= a_bin_c;
      complete     <= n_complete;
      wr_ptr       <= n_wr_ptr;
      fill_pending <= n_fill_pending;
      loaded       <= a_loaded;
      bt_sent      <= n_bt_sent;
      state        <= n_state;
      color        <= n_color;
      level        <= n_level;
      depth        <= a_depth;
      floor_c      <= a_floor;
      p_asg_r      <= n_asg_r;
      p_asg_c      <= n_asg_c;
      p_fill       <= n_fill;
      p_bt         <= n_bt;
      p_reply      <= a_reply;
      rout         <= a_rout;
      dout         <= a_dout;
    end
  end

  assign right_out = rout;
  assign down_out  = dout;
  assign state_o   = state;
  assign color_o   = color;
  assign busy      = p_asg_r || p_asg_c || p_fill || p_bt || p_reply || fill_pending
                  || (rout.tag != NT_NONE) || (dout.tag != NT_NONE);

endmodule
