// host_if: host-facing side of the UPGMA processing element.
//
// On the board the host reaches the processing element through the CardBus
// controller and its local (LAD) bus. The document lists what the host does
// there: write and read the two memory banks, start a run, then wait for an
// interrupt or poll a status register until the run is complete. This block
// gives those functions a simple register-bus form (this design's own,
// the document does not give the LAD protocol):
//   lad_space selects registers, the Left bank or the Right bank
//   (upgma_pkg::lad_space_e); lad_addr is a word address; lad_wr / lad_rd are
//   one-cycle strobes; lad_rvalid pulses with lad_rdata when a read returns.
//   Register reads return one cycle later, memory reads RD_LAT cycles later.
//   The host keeps at most one read outstanding.
// Registers (see upgma_pkg): REG_CTRL holds the taxa count and the interrupt
// enable, and writing its start bit starts a run; REG_STATUS shows busy, done
// and interrupt pending (write 1 to clear done / pending).
// Memory arbitration: while the engine is idle the host's memory requests go
// to the banks; while it is busy the engine owns both banks, host memory
// writes are dropped and host memory reads return zero after one cycle.
// irq is high while an enabled interrupt is pending; it is raised by the
// engine's 'done' pulse.
module host_if
  import upgma_pkg::*;
#(
  parameter int unsigned RD_LAT = 4,
  parameter int unsigned CNT_W  = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  // host (LAD) side
  input  lad_space_e        lad_space,
  input  logic [ADDR_W-1:0] lad_addr,
  input  logic              lad_wr,
  input  logic              lad_rd,
  input  logic [DATA_W-1:0] lad_wdata,
  output logic [DATA_W-1:0] lad_rdata,
  output logic              lad_rvalid,
  output logic              irq,
  // engine run control
  output logic              start,
  output logic [CNT_W-1:0]  n_taxa,
  input  logic              pe_busy,
  input  logic              pe_done,
  // memory arbitration
  input  mem_req_t          eng_left_req,
  input  mem_req_t          eng_right_req,
  output mem_req_t          left_req,
  output mem_req_t          right_req,
  input  logic [DATA_W-1:0] left_rdata,
  input  logic [DATA_W-1:0] right_rdata
);

  logic              irq_en, done_flag, irq_pend;
  logic              reg_rvalid;
  logic [DATA_W-1:0] reg_rdata;
  logic [RD_LAT-1:0] pend;        // memory read in flight, one bit per cycle
  logic [RD_LAT-1:0] pend_right;  // ... and which bank it went to

  logic host_mem, host_left, host_right, reg_acc;
  assign reg_acc    = (lad_space == SP_REG);
  assign host_left  = (lad_space == SP_LEFT);
  assign host_right = (lad_space == SP_RIGHT);
  assign host_mem   = (host_left || host_right) && !pe_busy;

  // ---------------------------------------------------- memory arbitration
  always_comb begin
    if (pe_busy) begin
      left_req  = eng_left_req;
      right_req = eng_right_req;
    end else begin
      left_req  = MEM_IDLE;
      right_req = MEM_IDLE;
      if (host_left) begin
        left_req.rd    = lad_rd;
        left_req.wr    = lad_wr;
        left_req.addr  = lad_addr;
        left_req.wdata = lad_wdata;
      end
      if (host_right) begin
        right_req.rd    = lad_rd;
        right_req.wr    = lad_wr;
        right_req.addr  = lad_addr;
        right_req.wdata = lad_wdata;
      end
    end
  end

  // ---------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_en     <= 1'b0;
      n_taxa     <= '0;
      start      <= 1'b0;
      done_flag  <= 1'b0;
      irq_pend   <= 1'b0;
      reg_rvalid <= 1'b0;
      reg_rdata  <= '0;
      pend       <= '0;
      pend_right <= '0;
    end else begin
      start      <= 1'b0;
      reg_rvalid <= 1'b0;

      if (pe_done) begin
        done_flag <= 1'b1;
        irq_pend  <= 1'b1;
      end

      if (lad_wr && reg_acc) begin
        if (lad_addr == REG_CTRL) begin
          irq_en <= lad_wdata[CTRL_IRQ_EN];
          n_taxa <= lad_wdata[CTRL_N_LSB +: CNT_W];
          if (lad_wdata[CTRL_START] && !pe_busy) begin
            start     <= 1'b1;
            done_flag <= 1'b0;
          end
        end else if (lad_addr == REG_STATUS) begin
          if (lad_wdata[ST_DONE]) done_flag <= 1'b0;
          if (lad_wdata[ST_IRQ])  irq_pend  <= 1'b0;
        end
      end

      if (lad_rd && (reg_acc || !host_mem)) begin
        reg_rvalid <= 1'b1;
        reg_rdata  <= '0;
        if (reg_acc && lad_addr == REG_CTRL) begin
          reg_rdata[CTRL_IRQ_EN]          <= irq_en;
          reg_rdata[CTRL_N_LSB +: CNT_W]  <= n_taxa;
        end else if (reg_acc && lad_addr == REG_STATUS) begin
          reg_rdata[ST_BUSY] <= pe_busy || start;
          reg_rdata[ST_DONE] <= done_flag;
          reg_rdata[ST_IRQ]  <= irq_pend;
        end
      end

      pend       <= (pend << 1)       | RD_LAT'(lad_rd && host_mem);
      pend_right <= (pend_right << 1) | RD_LAT'(host_right);
    end
  end

  assign lad_rvalid = reg_rvalid || pend[RD_LAT-1];
  assign lad_rdata  = reg_rvalid             ? reg_rdata   :
                      pend_right[RD_LAT-1]   ? right_rdata : left_rdata;
  assign irq        = irq_en && irq_pend;

endmodule
