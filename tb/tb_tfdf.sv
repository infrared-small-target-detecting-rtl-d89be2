// tb_tfdf: self-checking test of the three frames difference filter.
//
// A 6x4 TFDF is connected to a behavioural memory that answers read requests
// after one or two clocks, in order, and takes writes at once. Five random
// Top-hat frames are streamed, at the camera rate and with shorter random
// gaps. Checked: the first two frames give zero, later frames give
// min(|t_k - t_(k-1)|, |t_(k-1) - t_(k-2)|) at the right positions; the
// Top-hat frames land in the three ring regions in turn; each D frame is
// stored in the D region; exactly two reads are made per pixel; nothing is
// dropped.
module tb_tfdf;
  import ist_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 6, H = 4, NF = 5, FR = W * H;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic in_valid = 0;
  px_t  in_px = '0;
  logic th_wr_valid, rq_valid, rd_pop, d_wr_valid, out_valid, err_drop;
  wr_req_t th_wr_req, d_wr_req;
  logic [SRAM_AW-1:0] rq_addr;
  logic rd_valid = 0;
  logic [SRAM_DW-1:0] rd_data = '0;
  px_t out_px;

  tfdf #(.WIDTH(W), .HEIGHT(H)) dut (
    .clk, .rst_n, .in_valid, .in_px,
    .th_wr_valid, .th_wr_req, .th_wr_ready(1'b1),
    .rq_valid, .rq_addr, .rq_ready(1'b1),
    .rd_valid, .rd_data, .rd_pop,
    .d_wr_valid, .d_wr_req, .d_wr_ready(1'b1),
    .out_valid, .out_px, .err_drop);

  // Behavioural memory.
  logic [7:0] mem [int];
  int rq_q [$];
  logic [7:0] d_q [$];
  int n_reads = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_pop && d_q.size() > 0) void'(d_q.pop_front());
      if (rq_q.size() > 0 && ($urandom % 2 == 0 || rq_q.size() > 1)) begin
        int a;
        a = rq_q.pop_front();
        d_q.push_back(mem.exists(a) ? mem[a] : 8'd0);
      end
      if (rq_valid) begin
        rq_q.push_back(int'(rq_addr));
        n_reads++;
      end
      if (th_wr_valid) mem[int'(th_wr_req.addr)] = th_wr_req.data;
      if (d_wr_valid) mem[int'(d_wr_req.addr)] = d_wr_req.data;
      rd_valid <= d_q.size() > 0;
      rd_data <= (d_q.size() > 0) ? d_q[0] : 8'd0;
    end
  end

  int checks = 0, failures = 0;
  img_t t [NF], d [NF];
  int n_out = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      check(!err_drop, "request dropped");
      if (out_valid) begin
        int f, p;
        f = n_out / FR;
        p = n_out % FR;
        check(out_px.row == ROW_W'(p / W) && out_px.col == COL_W'(p % W), "position");
        check(int'(out_px.pix) == d[f][p], $sformatf("D f%0d p%0d got %0d exp %0d", f, p, out_px.pix, d[f][p]));
        n_out++;
      end
    end
  end

  initial begin
    #2000000;
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      t[f] = rand_img(W, H, 0, 255);
      d[f] = (f < 2) ? rand_img(W, H, 0, 0) : tfdf(t[f], t[f-1], t[f-2]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      for (int p = 0; p < FR; p++) begin
        repeat ((f % 2) ? 12 : 3 + $urandom % 4) @(negedge clk);
        in_valid = 1;
        in_px = '{pix: pix_t'(t[f][p]), row: ROW_W'(p / W), col: COL_W'(p % W)};
        @(negedge clk);
        in_valid = 0;
      end
      repeat (20) @(negedge clk);
      // frame f is in ring region f mod 3, its D in region 3
      for (int p = 0; p < FR; p++) begin
        check(mem[(f % 3) * FR + p] == 8'(t[f][p]), "Top-hat frame in its ring region");
        check(mem[3 * FR + p] == 8'(d[f][p]), "D frame stored");
      end
    end
    check(n_out == NF * FR, $sformatf("output count %0d", n_out));
    check(n_reads == 2 * NF * FR, $sformatf("reads %0d", n_reads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
