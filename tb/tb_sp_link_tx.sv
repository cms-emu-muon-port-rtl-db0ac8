// tb_sp_link_tx: checks frame output, BC0/BX0/Sync_Er insertion and TX_EN.
//
// Random selected muons and random settings of the four CSR0 mask bits are
// applied with sel_stb every second cycle. The reference computes frame 1
// (unchanged low half) and frame 2 with BC0 = bc0_any, BX0 from the TMB or
// the counter, and ER as the OR of the masked TMB, comparator and BC0-check
// sources; frame 1 must appear the cycle after sel_stb and frame 2 the cycle
// after that. Each error source is counted to make sure it fired. TX_EN is
// checked against csr0[9], IDLE mode, and a TXEN_PULSE-cycle low pulse.
// The insertion and mask rules follow the specification; the 8-cycle pulse
// (instead of 256) is this testbench's choice.
module tb_sp_link_tx;
  import mpc_pkg::*;
  localparam int NL = 3, TP = 8;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  lct_t sel [NL];
  logic sel_stb = 0, bc0_any = 0, bxn_lsb = 0, bxn_zero = 0;
  logic mask_bc0 = 0, bx0_from_tmb = 0, mask_tmb = 0, mask_comp = 0;
  logic txen_csr = 1, idle_mode = 0, txen_pulse = 0;
  logic [15:0] txd [NL];
  logic [NL-1:0] tx_en, link_vpf;
  logic idle_all;
  int checks = 0, failures = 0;
  int n_tmb_er = 0, n_comp_er = 0, n_bc0_er = 0;

  sp_link_tx #(.N_LINK(NL), .TXEN_PULSE(TP)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic one_bx();
    lct_t e [NL];
    logic [NL-1:0] een;
    foreach (sel[k]) sel[k] = 32'($urandom);
    bc0_any = ($urandom_range(0, 3) == 0);
    bxn_lsb = 1'($urandom); bxn_zero = 1'($urandom);
    {mask_bc0, bx0_from_tmb, mask_tmb, mask_comp} = 4'($urandom);
    idle_mode = 1'($urandom);
    for (int k = 0; k < NL; k++) begin
      bit tmb_er, comp_er, bc0_er;
      e[k] = sel[k];
      e[k].bc0 = bc0_any;
      e[k].bx0 = bx0_from_tmb ? sel[k].bx0 : bxn_lsb;
      tmb_er  = sel[k].er && !mask_tmb;
      comp_er = sel[k].vpf && (sel[k].bx0 != bxn_lsb) && !mask_comp;
      bc0_er  = bc0_any && !bxn_zero && !mask_bc0;
      n_tmb_er += tmb_er; n_comp_er += comp_er; n_bc0_er += bc0_er;
      e[k].er = tmb_er || comp_er || bc0_er;
      een[k] = txen_csr && (!idle_mode || sel[k].vpf || bc0_any);
    end
    sel_stb = 1;
    @(negedge clk);
    sel_stb = 0;
    bxn_lsb = ~bxn_lsb; bxn_zero = ~bxn_zero; // counter may move: must not matter
    for (int k = 0; k < NL; k++) begin
      check(txd[k] == e[k][15:0], $sformatf("link %0d frame 1", k));
      check(tx_en[k] == een[k], $sformatf("link %0d tx_en frame 1", k));
    end
    @(negedge clk);
    for (int k = 0; k < NL; k++) begin
      check(txd[k] == e[k][31:16], $sformatf("link %0d frame 2 %h exp %h", k, txd[k], e[k][31:16]));
      check(tx_en[k] == een[k], $sformatf("link %0d tx_en frame 2", k));
    end
  endtask

  int low;
  initial begin
    foreach (sel[k]) sel[k] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      txen_csr = (n % 10 != 3);
      one_bx();
    end
    check(n_tmb_er > 0 && n_comp_er > 0 && n_bc0_er > 0, "every Sync_Er source fired");
    // TX_EN low pulse of TP cycles
    txen_csr = 1; idle_mode = 0;
    one_bx();
    txen_pulse = 1;
    @(negedge clk) txen_pulse = 0;
    low = 0;
    for (int i = 0; i < 3 * TP; i++) begin
      if (i % 2 == 0) sel_stb = 1; else sel_stb = 0;
      low += (tx_en == '0);
      check(idle_all == (tx_en == '0), "idle_all");
      @(negedge clk);
    end
    sel_stb = 0;
    check(low == TP, $sformatf("TX_EN low for %0d cycles, expected %0d", low, TP));
    check(tx_en == '1, "TX_EN back after the pulse");
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
