// upgma_ctrl: controller of the UPGMA engine, following the document's
// control-flow chart (initialize; fetch, compare and store each distance until
// all are checked; form the new cluster; if nodes remain, compute average
// distances and remove the merged nodes, else set the root and signal done).
//
// How it works. Every cluster lives in a slot 0..N_MAX-1. A slot has an
// 'active' flag, a size (number of taxa, the "height" h of the document's
// average-distance equation) and the tree node id it currently stands for.
// Slot i, j distances are D[i][j] in the Left bank at address {i, j}; only
// i < j is used. One pass:
//   1. Scan every active pair i < j in row order. Each read waits RD_LAT
//      cycles (the board memory's read latency), then the distance goes to
//      min_finder. Inactive slots are skipped at one cycle each.
//   2. Write the merge record for the minimum pair (a, b) to the Right bank.
//   3. If only two clusters were left, write the root word and stop.
//   4. Else for every other active slot l: read D[a][l] and D[b][l], feed
//      them with the sizes of a and b to avg_unit, wait for the divider and
//      write the result back as D[a][l]: the new cluster takes slot a.
//   5. Deactivate slot b ("reduce the matrix"), add the sizes, give slot a the
//      new node id, and start the next pass.
// The slot scheme, the tie rule (first minimum in scan order) and the memory
// layout are this design's choices; the passes and the formulas follow the
// document. Writes take one cycle.
//
// Interface: 'start' (one cycle, while idle) with 'n_taxa' begins a run
// (a count above N_MAX is taken as N_MAX; below 2 the root is leaf 0);
// 'busy' is high until 'done' pulses for one cycle. The memory ports use
// upgma_pkg::mem_req_t; left_rdata is sampled RD_LAT cycles after a read.
// The min_finder and avg_unit control ports are driven from here; their
// instances live in the parent so that the datapath stays visible.
module upgma_ctrl
  import upgma_pkg::*;
#(
  parameter int unsigned N_MAX  = 256,
  parameter int unsigned RD_LAT = 4,
  parameter int unsigned SLOT_W = $clog2(N_MAX),
  parameter int unsigned CNT_W  = $clog2(N_MAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // run control
  input  logic              start,
  input  logic [CNT_W-1:0]  n_taxa,
  output logic              busy,
  output logic              done,
  // memory banks
  output mem_req_t          left_req,
  input  logic [DATA_W-1:0] left_rdata,
  output mem_req_t          right_req,
  // minimum finder
  output logic              mf_clear,
  output logic              mf_valid,
  output logic [DATA_W-1:0] mf_d,
  output logic [SLOT_W-1:0] mf_i,
  output logic [SLOT_W-1:0] mf_j,
  input  logic [DATA_W-1:0] mf_min_d,
  input  logic [SLOT_W-1:0] mf_min_i,
  input  logic [SLOT_W-1:0] mf_min_j,
  // average-distance unit
  output logic              av_acc_en,
  output logic              av_acc_first,
  output logic [DATA_W-1:0] av_d,
  output logic [CNT_W-1:0]  av_h,
  output logic              av_div_start,
  input  logic              av_done,
  input  logic [DATA_W-1:0] av_avg
);

  localparam int unsigned NODE_W = SLOT_W + 2;   // ids up to 2*N_MAX-2
  localparam int unsigned IDX_W  = SLOT_W + 1;   // slot counters that run to N_MAX
  localparam int unsigned WAIT_W = $clog2(RD_LAT + 1);

  initial begin
    assert (2 * SLOT_W <= ADDR_W) else $error("N_MAX too large for the address bus");
    assert (RD_LAT >= 1) else $error("RD_LAT must be at least 1");
  end

  typedef enum logic [3:0] {
    S_IDLE,
    S_INIT,       // Initialization
    S_SCAN,       // choose next pair ("All distances checked?")
    S_READ,       // Fetch new distance: issue read
    S_WAIT,       // read latency
    S_GOT,        // data back: Compare / Store if new minimum / average step
    S_FORM0,      // X, Y form new cluster: record word 0
    S_FORM1,      // record word 1, then "All nodes done?"
    S_AVG,        // Calculate average distance: choose next l
    S_DIVGO,      // both terms accumulated: start the divider
    S_DIV,        // wait for divider, write result
    S_REMOVE,     // Remove selected nodes
    S_ROOT,       // Set the root of the tree
    S_DONE        // Set "Done" and stop
  } state_e;

  typedef enum logic [1:0] {
    RD_SCAN,      // distance for the minimum search
    RD_AI,        // d(a, l)
    RD_BJ         // d(b, l)
  } rd_kind_e;

  state_e   state;
  rd_kind_e rd_kind;

  logic [N_MAX-1:0]  active;
  logic [CNT_W-1:0]  csize   [N_MAX];
  logic [NODE_W-1:0] node_id [N_MAX];

  logic [CNT_W-1:0]  n_reg;
  logic [CNT_W-1:0]  n_active;
  logic [NODE_W-1:0] next_node;
  logic [CNT_W-1:0]  merges;
  logic [IDX_W-1:0]  si, sj, sl;   // scan row, scan column, average target
  logic [WAIT_W-1:0] wcnt;
  logic [ADDR_W-1:0] rd_addr;
  logic [ADDR_W-1:0] wr_addr_dl;   // D[a][l] address kept for the write-back

  logic [SLOT_W-1:0] ma, mb;       // minimum pair from min_finder
  assign ma = mf_min_i;
  assign mb = mf_min_j;

  function automatic logic [ADDR_W-1:0] mat_addr(input logic [SLOT_W-1:0] x,
                                                 input logic [SLOT_W-1:0] y);
    // upper-triangle address of D[x][y]
    if (x < y) return ADDR_W'({x, y});
    else       return ADDR_W'({y, x});
  endfunction

  function automatic logic [ADDR_W-1:0] rec_addr(input logic [CNT_W-1:0] m,
                                                 input logic word);
    return REC_BASE + ADDR_W'({m, word});
  endfunction

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rd_kind   <= RD_SCAN;
      active    <= '0;
      n_reg     <= '0;
      n_active  <= '0;
      next_node <= '0;
      merges    <= '0;
      si        <= '0;
      sj        <= '0;
      sl        <= '0;
      wcnt      <= '0;
      rd_addr   <= '0;
      wr_addr_dl <= '0;
      for (int k = 0; k < int'(N_MAX); k++) begin
        csize[k]   <= '0;
        node_id[k] <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          n_reg <= (32'(n_taxa) > N_MAX) ? CNT_W'(N_MAX) : n_taxa;
          state <= S_INIT;
        end

        S_INIT: begin
          for (int k = 0; k < int'(N_MAX); k++) begin
            active[k]  <= (k < int'(n_reg));
            csize[k]   <= CNT_W'(1);
            node_id[k] <= NODE_W'(k);
          end
          n_active  <= n_reg;
          next_node <= NODE_W'(n_reg);
          merges    <= '0;
          si        <= '0;
          sj        <= IDX_W'(1);
          state     <= (n_reg < CNT_W'(2)) ? S_ROOT : S_SCAN;
        end

        S_SCAN: begin
          if (32'(si) + 1 >= 32'(n_reg)) begin
            state <= S_FORM0;                       // all distances checked
          end else if (!active[si[SLOT_W-1:0]] || 32'(sj) >= 32'(n_reg)) begin
            si <= si + 1'b1;                        // next row
            sj <= si + IDX_W'(2);
          end else if (!active[sj[SLOT_W-1:0]]) begin
            sj <= sj + 1'b1;                        // skip removed column
          end else begin
            rd_addr <= mat_addr(si[SLOT_W-1:0], sj[SLOT_W-1:0]);
            rd_kind <= RD_SCAN;
            state   <= S_READ;
          end
        end

        S_READ: begin
          wcnt  <= WAIT_W'(RD_LAT - 1);
          state <= (RD_LAT > 1) ? S_WAIT : S_GOT;
        end

        S_WAIT: begin
          wcnt <= wcnt - 1'b1;
          if (wcnt == WAIT_W'(1)) state <= S_GOT;
        end

        S_GOT: begin
          unique case (rd_kind)
            RD_SCAN: begin
              sj    <= sj + 1'b1;
              state <= S_SCAN;
            end
            RD_AI: begin
              rd_addr <= mat_addr(mb, sl[SLOT_W-1:0]);
              rd_kind <= RD_BJ;
              state   <= S_READ;
            end
            default: state <= S_DIVGO;
          endcase
        end

        S_FORM0: state <= S_FORM1;

        S_FORM1: begin
          merges <= merges + 1'b1;
          sl     <= '0;
          state  <= (n_active == CNT_W'(2)) ? S_ROOT : S_AVG;   // all nodes done?
        end

        S_AVG: begin
          if (32'(sl) >= 32'(n_reg)) begin
            state <= S_REMOVE;
          end else if (!active[sl[SLOT_W-1:0]] || sl[SLOT_W-1:0] == ma ||
                       sl[SLOT_W-1:0] == mb) begin
            sl <= sl + 1'b1;
          end else begin
            rd_addr    <= mat_addr(ma, sl[SLOT_W-1:0]);
            wr_addr_dl <= mat_addr(ma, sl[SLOT_W-1:0]);
            rd_kind    <= RD_AI;
            state      <= S_READ;
          end
        end

        S_DIVGO: state <= S_DIV;

        S_DIV: if (av_done) begin
          sl    <= sl + 1'b1;
          state <= S_AVG;
        end

        S_REMOVE: begin
          active[mb]  <= 1'b0;
          csize[ma]   <= csize[ma] + csize[mb];
          node_id[ma] <= next_node;
          next_node   <= next_node + 1'b1;
          n_active    <= n_active - 1'b1;
          si          <= '0;
          sj          <= IDX_W'(1);
          state       <= S_SCAN;
        end

        S_ROOT: state <= S_DONE;

        S_DONE: state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- outputs
  always_comb begin
    left_req  = MEM_IDLE;
    right_req = MEM_IDLE;

    if (state == S_READ) begin
      left_req.rd   = 1'b1;
      left_req.addr = rd_addr;
    end
    if (state == S_DIV && av_done) begin
      left_req.wr    = 1'b1;
      left_req.addr  = wr_addr_dl;
      left_req.wdata = av_avg;
    end

    if (state == S_FORM0) begin
      right_req.wr    = 1'b1;
      right_req.addr  = rec_addr(merges, 1'b0);
      right_req.wdata = {16'(node_id[ma]), 16'(node_id[mb])};
    end
    if (state == S_FORM1) begin
      right_req.wr    = 1'b1;
      right_req.addr  = rec_addr(merges, 1'b1);
      right_req.wdata = mf_min_d;
    end
    if (state == S_ROOT) begin
      right_req.wr    = 1'b1;
      right_req.addr  = ROOT_ADDR;
      right_req.wdata = {16'(n_reg),
                         16'((n_reg < CNT_W'(2)) ? NODE_W'(0) : next_node)};
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  assign mf_clear = (state == S_INIT) || (state == S_REMOVE);
  assign mf_valid = (state == S_GOT) && (rd_kind == RD_SCAN);
  assign mf_d     = left_rdata;
  assign mf_i     = si[SLOT_W-1:0];
  assign mf_j     = sj[SLOT_W-1:0];

  assign av_acc_en    = (state == S_GOT) && (rd_kind != RD_SCAN);
  assign av_acc_first = (rd_kind == RD_AI);
  assign av_d         = left_rdata;
  assign av_h         = (rd_kind == RD_AI) ? csize[ma] : csize[mb];
  assign av_div_start = (state == S_DIVGO);

endmodule
