// tb_host_if: host register and memory access through host_if, with two
// behavioural memory banks. Checks: memory writes and reads from the host
// while idle, with reads returning exactly RD_LAT cycles after the request;
// the engine's requests reaching the banks only while busy; host accesses
// dropped while busy; the control register (taxa count, start pulse, start
// ignored while busy); status bits; interrupt raised by done and cleared by a
// status write.
module tb_host_if;
  import upgma_pkg::*;
  localparam int RD_LAT = 4, CW = 9;
  logic clk = 0, rst_n = 0;
  lad_space_e lad_space = SP_REG;
  logic [ADDR_W-1:0] lad_addr = '0;
  logic lad_wr = 0, lad_rd = 0;
  logic [DATA_W-1:0] lad_wdata = '0, lad_rdata;
  logic lad_rvalid, irq, start;
  logic [CW-1:0] n_taxa;
  logic pe_busy = 0, pe_done = 0;
  mem_req_t eng_left_req = MEM_IDLE, eng_right_req = MEM_IDLE;
  mem_req_t left_req, right_req;
  logic [DATA_W-1:0] left_rdata, right_rdata;
  int checks = 0, failures = 0;
  int starts = 0;

  host_if #(.RD_LAT(RD_LAT), .CNT_W(CW)) dut (.*);
  sram_bank #(.DEPTH(1024), .RD_LAT(RD_LAT)) u_left  (.clk, .req(left_req),  .rdata(left_rdata));
  sram_bank #(.DEPTH(1024), .RD_LAT(RD_LAT)) u_right (.clk, .req(right_req), .rdata(right_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic host_write(input lad_space_e sp, input int a, input logic [31:0] v);
    @(negedge clk);
    lad_space = sp; lad_addr = ADDR_W'(a); lad_wdata = v; lad_wr = 1;
    @(negedge clk);
    lad_wr = 0;
  endtask

  task automatic host_read(input lad_space_e sp, input int a,
                           output logic [31:0] v, output int lat);
    @(negedge clk);
    lad_space = sp; lad_addr = ADDR_W'(a); lad_rd = 1;
    @(negedge clk);
    lad_rd = 0;
    lat = 1;
    while (!lad_rvalid && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    v = lad_rdata;
  endtask

  initial begin
    logic [31:0] v;
    int lat;
    logic [31:0] vals [16];
    repeat (2) @(posedge clk);
    rst_n = 1;

    // host memory access while idle
    for (int k = 0; k < 16; k++) begin
      vals[k] = $urandom;
      host_write((k % 2 == 1) ? SP_RIGHT : SP_LEFT, 100 + k, vals[k]);
    end
    for (int k = 0; k < 16; k++) begin
      host_read((k % 2 == 1) ? SP_RIGHT : SP_LEFT, 100 + k, v, lat);
      check(v == vals[k], $sformatf("mem read %0d: %h expected %h", k, v, vals[k]));
      check(lat == RD_LAT, $sformatf("mem read latency %0d", lat));
    end

    // engine requests are not passed while idle
    @(negedge clk);
    eng_left_req = '{rd: 1'b0, wr: 1'b1, addr: 19'd100, wdata: 32'h1234_5678};
    @(negedge clk);
    eng_left_req = MEM_IDLE;
    check(u_left.mem[100] == vals[0], "engine write ignored while idle");

    // control register and start
    host_write(SP_REG, int'(REG_CTRL), (32'd37 << CTRL_N_LSB) | 32'h3);
    @(negedge clk);
    check(starts == 1 && n_taxa == 9'd37, "start pulse and taxa count");
    host_read(SP_REG, int'(REG_CTRL), v, lat);
    check(v[CTRL_N_LSB +: CW] == 9'd37 && v[CTRL_IRQ_EN] && lat == 1, "ctrl readback");

    // engine busy: it owns the banks
    pe_busy = 1;
    host_read(SP_REG, int'(REG_STATUS), v, lat);
    check(v[ST_BUSY] && !v[ST_DONE], "status busy");
    @(negedge clk);
    eng_left_req  = '{rd: 1'b0, wr: 1'b1, addr: 19'd200, wdata: 32'hCAFE_0001};
    eng_right_req = '{rd: 1'b0, wr: 1'b1, addr: 19'd201, wdata: 32'hCAFE_0002};
    @(negedge clk);
    eng_left_req = MEM_IDLE; eng_right_req = MEM_IDLE;
    check(u_left.mem[200] == 32'hCAFE_0001 && u_right.mem[201] == 32'hCAFE_0002,
          "engine writes reach banks while busy");
    host_write(SP_LEFT, 102, 32'hBAD0_BAD0);
    check(u_left.mem[102] == vals[2], "host write dropped while busy");
    host_read(SP_LEFT, 102, v, lat);
    check(v == 0 && lat == 1, "host read while busy returns zero");
    host_write(SP_REG, int'(REG_CTRL), (32'd5 << CTRL_N_LSB) | 32'h3);
    check(starts == 1, "start ignored while busy");

    // done, interrupt
    @(negedge clk);
    pe_busy = 0; pe_done = 1;
    @(negedge clk);
    pe_done = 0;
    check(irq, "irq raised");
    host_read(SP_REG, int'(REG_STATUS), v, lat);
    check(!v[ST_BUSY] && v[ST_DONE] && v[ST_IRQ], "status done");
    host_write(SP_REG, int'(REG_STATUS), 32'h4);
    check(!irq, "irq cleared");
    host_read(SP_REG, int'(REG_STATUS), v, lat);
    check(v[ST_DONE] && !v[ST_IRQ], "done stays until cleared");

    // interrupt disabled: pending but no irq line
    host_write(SP_REG, int'(REG_CTRL), (32'd5 << CTRL_N_LSB));
    @(negedge clk); pe_done = 1; @(negedge clk); pe_done = 0;
    check(!irq, "irq masked");
    host_read(SP_REG, int'(REG_STATUS), v, lat);
    check(v[ST_IRQ], "pending while masked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
