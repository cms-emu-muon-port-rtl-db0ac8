// tb_muon_select: checks link selection in sorter and transparent mode.
//
// Drives random LCT sets with lct_stb every second cycle, as the receiver
// does. Sorter mode is compared with a reference best-3 selection, the shared
// FIFO_B enable (vpf of the best) and the winner bits. Transparent mode uses
// random CSR4 codes, including 0 and unused codes, and checks the selected
// LCT, the per-link enable, the winner bits gated by vpf, and that quality 0
// is not cancelled. The winner bits must come out as LCT0 frame then LCT1
// frame, and sel_stb must follow lct_stb by one cycle in both modes.
// The CSR4 codes and winner-bit rules follow the specification; code values
// above 18 selecting nothing is this design's choice.
module tb_muon_select;
  import mpc_pkg::*;
  localparam int NT = 9, NL = 3, NI = 18;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  lct_t lct [NI];
  logic lct_stb = 0;
  logic [15:0] csr4 = 0;
  lct_t sel [NL];
  logic [NL-1:0] sel_we;
  logic [NI-1:0] sel_winner;
  logic bc0_any, sel_stb;
  logic [NT-1:0] winner_frame;
  int checks = 0, failures = 0;
  int stb_cycle, sel_cycle, cyc = 0;
  int lat_sorter = -1, lat_transp = -1;

  always @(posedge clk) cyc++;

  muon_select #(.N_TMB(NT), .N_LINK(NL)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic void ref_sort(input lct_t in [NI], output lct_t b [NL], output logic [NI-1:0] w);
    bit taken [NI];
    foreach (taken[i]) taken[i] = 0;
    w = '0;
    for (int k = 0; k < NL; k++) begin
      int pick = -1;
      for (int i = 0; i < NI; i++)
        if (!taken[i] && in[i].quality != 0 && (pick < 0 || in[i].quality >= in[pick].quality)) pick = i;
      if (pick >= 0) begin taken[pick] = 1; w[pick] = 1; b[k] = in[pick]; end
      else b[k] = '0;
    end
  endfunction

  task automatic one_bx(input bit transparent);
    lct_t eb [NL];
    logic [NL-1:0] ewe;
    logic [NI-1:0] ew;
    logic ebc0;
    int lat;
    foreach (lct[i]) begin
      lct[i] = 32'($urandom);
      lct[i].quality = 4'($urandom_range(0, 5));
      lct[i].bc0 = ($urandom_range(0, 9) == 0);
    end
    ebc0 = 0;
    foreach (lct[i]) ebc0 |= lct[i].bc0;
    if (transparent) begin
      csr4[0] = 1;
      for (int k = 0; k < NL; k++) csr4[5*k+1 +: 5] = 5'($urandom_range(0, 21));
      ew = '0;
      for (int k = 0; k < NL; k++) begin
        int c = csr4[5*k+1 +: 5];
        if (c >= 1 && c <= 18) begin
          eb[k] = lct[c-1]; ewe[k] = lct[c-1].vpf; ew[c-1] |= lct[c-1].vpf;
        end else begin
          eb[k] = '0; ewe[k] = 0;
        end
      end
    end else begin
      csr4 = 16'($urandom) & 16'hFFFE;
      ref_sort(lct, eb, ew);
      ewe = {NL{eb[0].vpf}};
    end
    @(negedge clk) lct_stb = 1;
    stb_cycle = cyc;
    @(negedge clk) lct_stb = 0;
    lat = cyc - stb_cycle;
    check(sel_stb, "sel_stb one cycle after lct_stb");
    if (transparent) lat_transp = lat; else lat_sorter = lat;
    for (int k = 0; k < NL; k++)
      check(sel[k] == eb[k], $sformatf("mode %0d link %0d sel %h exp %h", transparent, k, sel[k], eb[k]));
    check(sel_we == ewe, $sformatf("mode %0d we %b exp %b", transparent, sel_we, ewe));
    check(sel_winner == ew, $sformatf("mode %0d winner %h exp %h", transparent, sel_winner, ew));
    check(bc0_any == ebc0, "bc0_any");
    @(negedge clk);
    for (int t = 0; t < NT; t++) check(winner_frame[t] == ew[2*t], "winner frame 1 = LCT0");
    @(negedge clk);
    for (int t = 0; t < NT; t++) check(winner_frame[t] == ew[2*t+1], "winner frame 2 = LCT1");
  endtask

  initial begin
    foreach (lct[i]) lct[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) one_bx(n % 2);
    // transparent mode passes quality 0 with vpf 1
    foreach (lct[i]) lct[i] = '0;
    lct[4].vpf = 1;
    csr4 = {5'd0, 5'd5, 5'd0, 1'b1};
    @(negedge clk) lct_stb = 1;
    @(negedge clk) lct_stb = 0;
    check(sel[1] == lct[4] && sel_we == 3'b010 && sel_winner == 18'(1 << 4), "quality 0 kept in transparent mode");
    check(lat_sorter == lat_transp && lat_sorter > 0, "same latency in both modes");
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
