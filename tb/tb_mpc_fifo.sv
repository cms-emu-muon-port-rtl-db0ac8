// tb_mpc_fifo: checks the 511-word FIFO against a queue model.
//
// Random pushes and pops with varying bias fill the FIFO to full and drain it
// to empty several times. Every popped word is compared with the model in the
// cycle after the pop; full, empty and count are checked every cycle, and
// writes to a full FIFO and reads from an empty one must be ignored. The
// FIFO must hold exactly 511 words.
// The 511-word depth follows the specification; the registered read and
// flag timing are this design's choices.
module tb_mpc_fifo;
  localparam int DEPTH = 511;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0, full, empty;
  logic [15:0] wdata = 0, rdata;
  logic [9:0] count;
  int checks = 0, failures = 0;
  logic [15:0] q [$];
  logic [15:0] exp_rd;
  bit pend = 0;
  int max_seen = 0;

  mpc_fifo #(.DEPTH(DEPTH), .WIDTH(16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int n = 0; n < 12000; n++) begin
      int bias;
      bias = ((n / 1500) % 2 == 0) ? 80 : 20;
      wr_en = ($urandom_range(0, 99) < bias);
      rd_en = ($urandom_range(0, 99) < 100 - bias);
      wdata = 16'($urandom);
      @(negedge clk);
      if (pend) check(rdata == exp_rd, $sformatf("read data %h exp %h", rdata, exp_rd));
      pend = 0;
      // model: effects of the cycle just completed (flags were sampled before)
      begin
        bit dw, dr;
        dw = wr_en && q.size() < DEPTH;
        dr = rd_en && q.size() > 0;
        if (dr) begin exp_rd = q.pop_front(); pend = 1; end
        if (dw) q.push_back(wdata);
      end
      // data of a pop are visible now (registered)
      if (pend) begin check(rdata == exp_rd, "read data"); pend = 0; end
      check(count == 10'(q.size()), $sformatf("count %0d exp %0d", count, q.size()));
      check(full == (q.size() == DEPTH), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      if (q.size() > max_seen) max_seen = q.size();
    end
    check(max_seen == DEPTH, $sformatf("reached full (%0d)", max_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
