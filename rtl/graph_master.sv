// graph_master: host interface and search control of the accelerator.
//
// The master sits at the corner of the array where the row ring and the
// column ring of the edge bus meet.  It
//   * holds the initial conditions written by the host (one entry per cell:
//     0 = free, c+1 = preset to colour c) and, after start, sends every node
//     its first fill: a one-colour list for a preset cell, the all-colour list
//     for a free one.  Each list enters at the node's column edge, which
//     treats it as an ordinary fill (as the description specifies);
//   * forwards fill lists arriving from the row edges onto the column ring;
//   * runs the search in a fixed node order (row-major).  It asks the
//     current node whether it already holds a colour (QUERY); if it does the
//     master moves on, otherwise it orders a GUESS, which every edge also
//     takes as the signal to push its free list.  It then waits until the
//     whole array has been idle for IDLE_WAIT cycles (140 in the
//     description) before the next query;
//   * on a backtrack request it lets the array go idle, then orders one
//     backtrack (BT: edges pop, nodes undo the last guess) however many
//     requests arrived, and resumes the search at the node whose guess was
//     undone.  That node retries with its next colour; when it has none it
//     raises a contradiction at the level above, which is the regression of
//     the description.  A contradiction with no guess outstanding proves
//     that the square cannot be completed;
//   * when every node holds a colour it reads all colours into a result
//     memory the host can read, and raises done with solved=1.
//
// Idleness is taken from net_busy (an OR of every node's and edge's busy
// output) plus the master's own ring inputs; the description only says the
// master waits for a fixed number of idle bus cycles.  Host port widths,
// the query/reply handshake and the statistics counters are this design's
// choices.
module graph_master
  import gc_pkg::*;
#(
  parameter int N         = 6,
  parameter int IDLE_WAIT = 140
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host side
  input  logic                          preset_we,
  input  logic [$clog2(N*N)-1:0]        preset_addr,
  input  logic [cw(N):0]                preset_val,
  input  logic                          start,
  output logic                          done,
  output logic                          solved,
  input  logic [$clog2(N*N)-1:0]        res_addr,
  output logic [cw(N)-1:0]              res_color,
  output logic [31:0]                   n_guess,
  output logic [31:0]                   n_backtrack,
  output logic [31:0]                   n_cycles,
  // edge bus rings
  output logic [ebw(N)-1:0]             rr_out,
  input  logic [ebw(N)-1:0]             rr_in,
  output logic [ebw(N)-1:0]             cr_out,
  input  logic [ebw(N)-1:0]             cr_in,
  input  logic                          net_busy
);
  localparam int CW  = cw(N);
  localparam int AW  = $clog2(N * N);
  localparam int LW  = lw(N);
  localparam int IW  = $clog2(IDLE_WAIT + 1);

  typedef struct packed {
    etag_e         tag;
    logic [CW-1:0] row;
    logic [CW-1:0] col;
    logic [N-1:0]  data;
  } eword_t;

  typedef enum logic [3:0] {
    M_IDLE, M_PRESET, M_SETTLE, M_SELECT, M_WAITREP, M_GUESS, M_DONE
  } mstate_e;

  mstate_e        st;
  logic [CW:0]    pre_mem [N*N];
  logic [CW-1:0]  res_mem [N*N];
  logic [2*CW-1:0] gstack [N*N];     // {row, col} of each outstanding guess
  logic [CW-1:0]  kr, kc;            // current node
  logic           kend;              // scan passed the last node
  logic [LW-1:0]  depth;
  logic [IW-1:0]  idle_cnt;
  logic           contra;
  eword_t         rin, cin, rout, cout;
  logic           fwd;
  logic           reading;

  assign rin = eword_t'(rr_in);
  assign cin = eword_t'(cr_in);
  assign fwd = (rin.tag == ET_FILL);

  localparam eword_t ENONE = '{tag: ET_NONE, row: '0, col: '0, data: '0};

  function automatic logic [AW-1:0] addr_of(input logic [CW-1:0] r, input logic [CW-1:0] c);
    return AW'(r) * AW'(N) + AW'(c);
  endfunction

  logic rep_match;
  assign rep_match = (rin.row == kr) && (rin.col == kc);

  logic [CW:0] pv;
  assign pv = pre_mem[addr_of(kr, kc)];

  logic net_idle;
  assign net_idle = !net_busy && rin.tag == ET_NONE && cin.tag == ET_NONE
                 && rout.tag == ET_NONE && cout.tag == ET_NONE;

  always_ff @(posedge clk) begin
    if (preset_we) pre_mem[preset_addr] <= preset_val;
  end

  assign res_color = res_mem[res_addr];

  // guess stack and result memory (no reset: written before they are read)
  logic rep_set;
  assign rep_set = (st == M_WAITREP) && !contra && rin.tag == ET_RSET && rep_match
                && cin.tag != ET_BTREQ;

  always_ff @(posedge clk) begin
    if (st == M_GUESS && !fwd) gstack[AW'(depth)] <= {kr, kc};
    if (rep_set && reading)    res_mem[addr_of(kr, kc)] <= rin.data[CW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= M_IDLE;
      kr          <= '0;
      kc          <= '0;
      kend        <= 1'b0;
      depth       <= '0;
      idle_cnt    <= '0;
      contra      <= 1'b0;
      rout        <= ENONE;
      cout        <= ENONE;
      done        <= 1'b0;
      solved      <= 1'b0;
      reading     <= 1'b0;
      n_guess     <= '0;
      n_backtrack <= '0;
      n_cycles    <= '0;
    end else begin
      rout <= ENONE;
      // column ring: forwarding a fill list has priority over our own words
      cout <= fwd ? rin : ENONE;
      if (st != M_IDLE && st != M_DONE) n_cycles <= n_cycles + 1'b1;
      if ((rin.tag == ET_BTREQ || cin.tag == ET_BTREQ) && st != M_IDLE)
        contra <= 1'b1;

      unique case (st)
        M_IDLE: if (start) begin
          st          <= M_PRESET;
          kr          <= '0;
          kc          <= '0;
          kend        <= 1'b0;
          depth       <= '0;
          contra      <= 1'b0;
          done        <= 1'b0;
          solved      <= 1'b0;
          reading     <= 1'b0;
          n_guess     <= '0;
          n_backtrack <= '0;
          n_cycles    <= '0;
        end

        M_PRESET: if (!fwd) begin
          cout <= '{tag: ET_FILL, row: kr, col: kc,
                    data: (pv == '0) ? {N{1'b1}} : (N'(1) << (pv - 1'b1))};
          if (kc == CW'(N - 1)) begin
            kc <= '0;
            if (kr == CW'(N - 1)) begin
              kr       <= '0;
              st       <= M_SETTLE;
              idle_cnt <= '0;
            end else begin
              kr <= kr + 1'b1;
            end
          end else begin
            kc <= kc + 1'b1;
          end
        end

        // wait for the array to go quiet, then handle a contradiction or
        // carry on with the scan
        M_SETTLE: begin
          idle_cnt <= net_idle ? ((idle_cnt == IW'(IDLE_WAIT)) ? idle_cnt : idle_cnt + 1'b1) : '0;
          if (net_idle && idle_cnt == IW'(IDLE_WAIT)) begin
            if (contra) begin
              if (depth == '0) begin
                st     <= M_DONE;
                done   <= 1'b1;
                solved <= 1'b0;
              end else begin
                // one backtrack per guess, however many requests arrived
                rout        <= '{tag: ET_BT, row: '0, col: '0, data: '0};
                cout        <= '{tag: ET_BT, row: '0, col: '0, data: '0};
                {kr, kc}    <= gstack[AW'(depth - 1'b1)];
                kend        <= 1'b0;
                depth       <= depth - 1'b1;
                contra      <= 1'b0;
                n_backtrack <= n_backtrack + 1'b1;
                idle_cnt    <= '0;
              end
            end else begin
              st <= M_SELECT;
            end
          end
        end

        M_SELECT: begin
          if (kend) begin
            if (reading) begin
              st   <= M_DONE;
              done <= 1'b1;
              solved <= 1'b1;
            end else begin
              reading <= 1'b1;
              kr      <= '0;
              kc      <= '0;
              kend    <= 1'b0;
            end
          end else if (!fwd) begin
            cout <= '{tag: ET_QUERY, row: kr, col: kc, data: '0};
            st   <= M_WAITREP;
          end
        end

        M_WAITREP: begin
          if (contra || rin.tag == ET_BTREQ || cin.tag == ET_BTREQ) begin
            st       <= M_SETTLE;
            idle_cnt <= '0;
          end else if (rin.tag == ET_RSET && rep_match) begin
            st <= M_SELECT;
            if (kc == CW'(N - 1)) begin
              kc <= '0;
              if (kr == CW'(N - 1)) kend <= 1'b1;
              else                  kr   <= kr + 1'b1;
            end else begin
              kc <= kc + 1'b1;
            end
          end else if (rin.tag == ET_RREADY && rep_match) begin
            st <= reading ? M_SETTLE : M_GUESS;
          end
        end

        M_GUESS: if (!fwd) begin
          rout          <= '{tag: ET_GUESS, row: kr, col: kc, data: '0};
          cout          <= '{tag: ET_GUESS, row: kr, col: kc, data: '0};
          depth         <= depth + 1'b1;
          n_guess       <= n_guess + 1'b1;
          st            <= M_SETTLE;
          idle_cnt      <= '0;
        end

        M_DONE: ;   // a new problem needs a reset of the whole array

        default: st <= M_IDLE;
      endcase
    end
  end

  assign rr_out = rout;
  assign cr_out = cout;

endmodule
