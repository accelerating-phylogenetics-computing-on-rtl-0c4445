// upgma_pe: UPGMA tree-building engine for the FPGA of a PC-card accelerator.
//
// UPGMA builds a rooted tree from a matrix of pairwise distances between n
// taxa: repeatedly find the closest pair of clusters, merge them into a new
// node at half their distance, replace their rows by the size-weighted mean
// distance, and stop when one cluster is left. The two costly steps in
// software, the minimum search over all pairs and the average-distance update,
// are the two datapaths here (min_finder and avg_unit); upgma_ctrl steps them
// through the passes and host_if connects the host.
//
// Board connections (as on the document's block diagram):
//   Left bank : distance matrix, D[i][j] at word {i, j}, 32-bit words,
//               19-bit address. The host writes it before a run; the run
//               overwrites it.
//   Right bank: output tree (layout in upgma_pkg).
//   LAD bus   : host register/memory access, see host_if.
// Both banks return read data RD_LAT cycles after the request (the document
// gives four cycles) and take writes in one cycle.
//
// Assertions check the handshakes between controller and datapath: no
// divider start or accumulation while a division runs, no tree record without
// a stored minimum, never a read and a write on one bank in the same cycle.
//
// Run: host writes D (upper triangle suffices), writes REG_CTRL with the taxa
// count and the start bit, waits for irq or polls REG_STATUS, then reads the
// tree. N_MAX = 256 taxa fills the 64K-word Left bank with a full matrix.
// Cycle cost: each pass reads every remaining pair (RD_LAT + 2 cycles each),
// then every other cluster costs two reads, DATA_W + CNT_W + 1 divider
// cycles and a write.
module upgma_pe
  import upgma_pkg::*;
#(
  parameter int unsigned N_MAX  = 256,
  parameter int unsigned RD_LAT = 4
) (
  input  logic              clk,          // F_Clk
  input  logic              rst_n,
  // LAD bus (host side)
  input  lad_space_e        lad_space,
  input  logic [ADDR_W-1:0] lad_addr,
  input  logic              lad_wr,
  input  logic              lad_rd,
  input  logic [DATA_W-1:0] lad_wdata,
  output logic [DATA_W-1:0] lad_rdata,
  output logic              lad_rvalid,
  output logic              irq,
  // Left memory bank
  output mem_req_t          left_req,
  input  logic [DATA_W-1:0] left_rdata,
  // Right memory bank
  output mem_req_t          right_req,
  input  logic [DATA_W-1:0] right_rdata
);

  localparam int unsigned SLOT_W = $clog2(N_MAX);
  localparam int unsigned CNT_W  = $clog2(N_MAX + 1);

  logic              start, busy, done;
  logic [CNT_W-1:0]  n_taxa;
  mem_req_t          eng_left_req, eng_right_req;

  logic              mf_clear, mf_valid, mf_found;
  logic              mf_take;      // observation only: a new minimum is stored
  logic [DATA_W-1:0] mf_d, mf_min_d;
  logic [SLOT_W-1:0] mf_i, mf_j, mf_min_i, mf_min_j;

  logic              av_acc_en, av_acc_first, av_div_start, av_busy, av_done;
  logic [DATA_W-1:0] av_d, av_avg;
  logic [CNT_W-1:0]  av_h;
  logic [DATA_W+CNT_W:0] av_num;   // observation only: numerator
  logic [CNT_W:0]    av_den;       // observation only: denominator

  host_if #(.RD_LAT(RD_LAT), .CNT_W(CNT_W)) u_host (
    .clk, .rst_n,
    .lad_space, .lad_addr, .lad_wr, .lad_rd, .lad_wdata, .lad_rdata, .lad_rvalid, .irq,
    .start, .n_taxa, .pe_busy(busy), .pe_done(done),
    .eng_left_req, .eng_right_req,
    .left_req, .right_req, .left_rdata, .right_rdata
  );

  upgma_ctrl #(.N_MAX(N_MAX), .RD_LAT(RD_LAT)) u_ctrl (
    .clk, .rst_n,
    .start, .n_taxa, .busy, .done,
    .left_req(eng_left_req), .left_rdata, .right_req(eng_right_req),
    .mf_clear, .mf_valid, .mf_d, .mf_i, .mf_j, .mf_min_d, .mf_min_i, .mf_min_j,
    .av_acc_en, .av_acc_first, .av_d, .av_h, .av_div_start, .av_done, .av_avg
  );

  min_finder #(.DATA_W(DATA_W), .IDX_W(SLOT_W)) u_min (
    .clk, .rst_n,
    .clear(mf_clear), .valid(mf_valid), .d(mf_d), .i(mf_i), .j(mf_j),
    .min_d(mf_min_d), .min_i(mf_min_i), .min_j(mf_min_j), .found(mf_found), .take(mf_take)
  );

  avg_unit #(.DATA_W(DATA_W), .CNT_W(CNT_W)) u_avg (
    .clk, .rst_n,
    .acc_en(av_acc_en), .acc_first(av_acc_first), .d(av_d), .h(av_h),
    .div_start(av_div_start), .busy(av_busy), .done(av_done), .avg(av_avg),
    .num(av_num), .den(av_den)
  );

  // Handshake rules between the controller and the datapath units.
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n)
    av_div_start |-> !av_busy)
    else $error("divider started while busy");
  a_acc_idle: assert property (@(posedge clk) disable iff (!rst_n)
    av_acc_en |-> !av_busy)
    else $error("accumulator changed during a division");
  a_min_held: assert property (@(posedge clk) disable iff (!rst_n)
    (eng_right_req.wr && eng_right_req.addr != ROOT_ADDR) |-> mf_found)
    else $error("tree record written without a minimum");
  a_one_bank_op: assert property (@(posedge clk) disable iff (!rst_n)
    !(left_req.rd && left_req.wr) && !(right_req.rd && right_req.wr))
    else $error("read and write in the same cycle on one bank");

endmodule
