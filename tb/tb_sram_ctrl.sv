// tb_sram_ctrl: self-checking test of the shared-memory SRAM controller.
//
// The channel FIFOs are modelled by the testbench. Checked:
//  * with every channel busy, the port is granted in the fixed slot order
//    Top-hat write, TFDF read (twice), TFDF write, or read, or write, close
//    read, close write, VGA read (four times), and then again;
//  * with only some channels busy, one of them is served every clock and the
//    idle slots cost nothing;
//  * a read channel whose data FIFO has no room is not served;
//  * a write puts the head's address and data on the SRAM port, and read
//    data come back, one clock later, to the channel that asked.
module tb_sram_ctrl;
  import ist_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [3:0] wr_avail = '0, rq_avail = '0, rd_room = '1;
  wr_req_t wr_head [4];
  logic [SRAM_AW-1:0] rq_head [4];
  logic [3:0] wr_pop, rq_pop, rd_push;
  logic [SRAM_DW-1:0] rd_data, sram_wdata;
  logic [SRAM_DW-1:0] sram_rdata = '0;
  logic sram_we, sram_re;
  logic [SRAM_AW-1:0] sram_addr;
  logic [2:0] cur_slot;

  sram_ctrl dut (
    .clk, .rst_n, .wr_avail, .wr_head, .wr_pop, .rq_avail, .rq_head, .rd_room,
    .rq_pop, .rd_push, .rd_data, .sram_we, .sram_re, .sram_addr, .sram_wdata,
    .sram_rdata, .cur_slot);

  for (genvar i = 0; i < 4; i++) begin : g_heads
    assign wr_head[i] = '{addr: SRAM_AW'(100 + i), data: SRAM_DW'(8'h10 + i)};
    assign rq_head[i] = SRAM_AW'(200 + i);
  end

  // SRAM: read data is a function of the address.
  always @(posedge clk) if (sram_re) sram_rdata <= SRAM_DW'(sram_addr) ^ 8'h5a;

  int checks = 0, failures = 0;
  int served [$];
  int last_rd = -1;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      int s;
      s = -1;
      check($countones({wr_pop, rq_pop}) <= 1, "at most one access per clock");
      for (int i = 0; i < 4; i++) begin
        if (wr_pop[i]) begin
          s = 2 * i;
          check(sram_we && !sram_re && sram_addr == wr_head[i].addr && sram_wdata == wr_head[i].data, "write on port");
        end
        if (rq_pop[i]) begin
          s = 2 * i + 1;
          check(sram_re && !sram_we && sram_addr == rq_head[i], "read on port");
        end
      end
      if (last_rd >= 0)
        check(rd_push == 4'(1 << last_rd) && rd_data == (SRAM_DW'(200 + last_rd) ^ 8'h5a), "read data routed");
      else check(rd_push == '0, "no stray read data");
      last_rd = -1;
      for (int i = 0; i < 4; i++) if (rq_pop[i]) last_rd = i;
      served.push_back(s);
    end
  end

  initial begin
    #100000;
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_order [12] = '{0, 1, 1, 2, 3, 4, 5, 6, 7, 7, 7, 7};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // all busy
    wr_avail = '1;
    rq_avail = '1;
    repeat (36) @(negedge clk);
    for (int i = 0; i < 36; i++)
      check(served[i] == exp_order[i % 12], $sformatf("slot order at %0d: %0d exp %0d", i, served[i], exp_order[i % 12]));
    // only Top-hat write and VGA read busy: no idle clocks
    wr_avail = 4'b0001;
    rq_avail = 4'b1000;
    @(negedge clk);
    served.delete();
    repeat (20) @(negedge clk);
    foreach (served[i]) check(served[i] == 0 || served[i] == 7, "only busy channels served");
    foreach (served[i]) check(served[i] >= 0, "no idle clock while work waits");
    // close read busy but without room: never served
    wr_avail = '0;
    rq_avail = 4'b0100;
    rd_room = 4'b1011;
    @(negedge clk);
    served.delete();
    repeat (10) @(negedge clk);
    foreach (served[i]) check(served[i] == -1, "channel without room not served");
    rd_room = '1;
    repeat (2) @(negedge clk);
    check(served[$] == 5, "served once room is back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
