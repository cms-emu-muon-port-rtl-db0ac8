// tb_fifo_a_bank: checks VME loading and the Test-mode play-out of FIFO_A.
//
// Uses 3 TMBs and 8-word buffers. Random words are pushed over the VME
// strobes into every half, with one half left shorter than the others.
// A start outside Test mode must do nothing. In Test mode a start must play
// out NWORDS frames beginning in a phase-0 cycle: frame t = {high half word,
// low half word}, zeros where a half has run empty, with frame_valid high for
// exactly NWORDS cycles and busy high meanwhile. Afterwards the flags must
// show empty, and a VME write/read round trip must return the data.
// The two-half layout and play-out length follow the specification; the
// small sizes (3 TMBs, 8 words) are this testbench's choice.
module tb_fifo_a_bank;
  localparam int NT = 3, D = 8, NW = 8;
  logic clk = 0, rst = 1, phase = 0;
  always #5 clk = ~clk;
  always @(posedge clk) phase <= rst ? 1'b0 : ~phase;

  logic test_mode = 0, start = 0;
  logic [2*NT-1:0] vme_wr = 0, vme_rd = 0;
  logic [15:0] vme_wdata = 0, vme_rdata [2*NT];
  logic [31:0] frame [NT];
  logic frame_valid, busy, any_full, all_empty;
  int checks = 0, failures = 0;
  logic [15:0] data [2*NT][$];

  fifo_a_bank #(.N_TMB(NT), .DEPTH(D), .NWORDS(NW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int nvalid, first_phase;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(all_empty && !any_full, "empty after reset");
    for (int h = 0; h < 2 * NT; h++) begin
      int n;
      n = (h == 3) ? 5 : D;
      for (int i = 0; i < n; i++) begin
        vme_wdata = 16'($urandom);
        data[h].push_back(vme_wdata);
        vme_wr = 1 << h;
        @(negedge clk);
      end
      vme_wr = 0;
    end
    check(any_full && !all_empty, "full flag after loading");
    // start outside Test mode: ignored
    start = 1; @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    check(!busy && any_full, "no play-out outside Test mode");
    test_mode = 1;
    start = 1; @(negedge clk); start = 0;
    check(busy, "busy after start");
    nvalid = 0; first_phase = -1;
    for (int c = 0; c < 40; c++) begin
      @(negedge clk);
      if (frame_valid) begin
        if (first_phase < 0) first_phase = phase;
        for (int t = 0; t < NT; t++) begin
          logic [15:0] lo, hi;
          lo = data[2*t].size() ? data[2*t].pop_front() : 16'h0;
          hi = data[2*t+1].size() ? data[2*t+1].pop_front() : 16'h0;
          check(frame[t] == {hi, lo}, $sformatf("frame %0d TMB%0d %h exp %h", nvalid, t+1, frame[t], {hi, lo}));
        end
        nvalid++;
      end
    end
    check(nvalid == NW, $sformatf("%0d frames played, expected %0d", nvalid, NW));
    check(first_phase == 0, "play-out starts with a first frame");
    check(!busy && all_empty && !any_full, "empty after play-out");
    // VME round trip on half 4
    vme_wdata = 16'hBEEF; vme_wr = 1 << 4; @(negedge clk); vme_wr = 0;
    vme_rd = 1 << 4; @(negedge clk); vme_rd = 0;
    check(vme_rdata[4] == 16'hBEEF, "VME read back");
    check(all_empty, "empty after VME read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
