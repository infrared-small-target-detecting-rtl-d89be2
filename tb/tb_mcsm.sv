// tb_mcsm: self-checking test of the Multi-Core Shared-Memory.
//
// Four writer and four reader clients share the behavioural SRAM through the
// FIFOs and controller. Phase 1: each writer fills its own block of N words.
// Phase 2: the writers fill four new blocks while each reader reads back,
// in random order, the block one writer stored in phase 1, all eight
// channels at once with random stalls on the client side; reader 3 takes
// its data slowly, so its data FIFO fills up. Checked: every
// word read back equals what was written and arrives in request order, no
// FIFO overflows, and while all eight channels have traffic the SRAM port
// is used on most clocks. The FIFO assertions are switched off so that an
// overflow is counted as a failure and the run still reports its result.
module tb_mcsm;
  import ist_pkg::*;

  localparam int N = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [3:0] wr_valid = '0, rq_valid = '0, rd_pop = '0;
  wr_req_t wr_req [4];
  logic [SRAM_AW-1:0] rq_addr [4];
  logic [3:0] wr_ready, rq_ready, rd_valid;
  logic [SRAM_DW-1:0] rd_data [4];
  logic sram_we, sram_re, err_overflow;
  logic [SRAM_AW-1:0] sram_addr;
  logic [SRAM_DW-1:0] sram_wdata, sram_rdata;

  mcsm #(.CHECK_FLOW(1'b0)) dut (
    .clk, .rst_n, .wr_valid, .wr_req, .wr_ready, .rq_valid, .rq_addr, .rq_ready,
    .rd_valid, .rd_data, .rd_pop, .sram_we, .sram_re, .sram_addr, .sram_wdata,
    .sram_rdata, .err_overflow);

  sram_model #(.AW(SRAM_AW), .DW(SRAM_DW), .DEPTH(8 * N)) u_sram (
    .clk, .we(sram_we), .re(sram_re), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  logic [7:0] golden [8 * N];
  int wcnt [4], rq_cnt [4], rd_cnt [4];
  int order [4][N];
  logic [7:0] expq [4][$];
  int phase = 0, busy_cycles = 0, used_cycles = 0;

  // Clients act on the falling edge; handshakes complete on the rising edge.
  always @(negedge clk) if (rst_n && phase > 0) begin
    for (int i = 0; i < 4; i++) begin
      int blk;
      blk = (phase == 1) ? i : 4 + i;
      // writer
      if (wr_valid[i]) wcnt[i]++;
      wr_valid[i] = (wcnt[i] < N) && ($urandom % 4 != 0) && wr_ready[i];
      wr_req[i] = '{addr: SRAM_AW'(blk * N + wcnt[i]), data: golden[blk * N + wcnt[i]]};
      if (phase == 2) begin
        // reader
        if (rq_valid[i]) begin
          expq[i].push_back(golden[i * N + order[i][rq_cnt[i]]]);
          rq_cnt[i]++;
        end
        rq_valid[i] = (rq_cnt[i] < N) && ($urandom % 4 != 0) && rq_ready[i];
        rq_addr[i] = SRAM_AW'(i * N + order[i][(rq_cnt[i] < N) ? rq_cnt[i] : 0]);
        rd_pop[i] = rd_valid[i] && ((i == 3) ? ($urandom % 8 == 0) : ($urandom % 4 != 0));
        if (rd_pop[i]) begin
          check(expq[i].size() > 0 && rd_data[i] == expq[i][0], $sformatf("reader %0d word %0d got %0h exp %0h t=%0t", i, rd_cnt[i], rd_data[i], expq[i][0], $time));
          void'(expq[i].pop_front());
          rd_cnt[i]++;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) check(!err_overflow, "FIFO overflow");
    if (phase == 2 && rq_cnt[0] < N - 20 && wcnt[0] < N - 20) begin
      busy_cycles++;
      used_cycles += int'(sram_we || sram_re);
    end
  end

  initial begin
    #3000000;
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (golden[i]) golden[i] = 8'($urandom);
    for (int i = 0; i < 4; i++) begin
      wcnt[i] = 0; rq_cnt[i] = 0; rd_cnt[i] = 0;
      for (int k = 0; k < N; k++) order[i][k] = k;
      order[i].shuffle();
      wr_req[i] = '0;
      rq_addr[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    phase = 1;
    wait (wcnt[0] == N && wcnt[1] == N && wcnt[2] == N && wcnt[3] == N);
    repeat (200) @(negedge clk);
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < N; k++) check(u_sram.mem[b * N + k] == golden[b * N + k], $sformatf("phase 1 block %0d word %0d", b, k));
    for (int i = 0; i < 4; i++) wcnt[i] = 0;
    phase = 2;
    wait (rd_cnt[0] == N && rd_cnt[1] == N && rd_cnt[2] == N && rd_cnt[3] == N);
    wait (wcnt[0] == N && wcnt[1] == N && wcnt[2] == N && wcnt[3] == N);
    repeat (200) @(negedge clk);
    for (int b = 4; b < 8; b++)
      for (int k = 0; k < N; k++) check(u_sram.mem[b * N + k] == golden[b * N + k], "phase 2 block written");
    check(busy_cycles > 100 && used_cycles * 10 >= busy_cycles * 9,
          $sformatf("port use %0d of %0d busy clocks", used_cycles, busy_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
