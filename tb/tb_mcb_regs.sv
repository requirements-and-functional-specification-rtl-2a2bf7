// tb_mcb_regs: self-checking test of the MCB register file.
//
// The test works the bus as the CMIB would. A write holds cs_n and rd_wr_n
// low for one clock. A read holds cs_n low with rd_wr_n high for two
// clocks and samples the data in the second. Checks:
//  - after reset, DESIGNID, PLEN and TLEN hold their values;
//  - 400 random writes and read-backs of the read/write registers, with the
//    reserved bits masked, and the settings output (cfg) following them;
//  - STATUS0-4 read as the written value XOR the live status bits;
//  - monitor registers (PPSCNT, DTWADDR for the selected generator, TCOUNT,
//    TOGCOUNT) return the status input;
//  - CONTROL's DT-Arm/DT-Clr bits belong to the generator DTSELECT names;
//    CONTROL survives rst_n and is cleared by por_n;
//  - writes to PMPORT, DTPORT, XBDATA, TCSTAMP2 and PCSTATE each give a
//    one-clock strobe with the data;
//  - the interrupt sets INTRIND, mcb_intr pulses only with INTR-En, and a
//    write to INTRIND clears it;
//  - TIMER counts us_tick pulses;
//  - an unused address reads 0.
module tb_mcb_regs;
  import tfpga_pkg::*;
  logic mcb_clk = 1'b0, rst_n = 1'b0, por_n = 1'b0;
  logic [7:0] mcb_addr = '0;
  logic [15:0] mcb_data_i = '0, mcb_data_o;
  logic mcb_data_oe, mcb_cs_n = 1'b1, mcb_rd_wr_n = 1'b1, mcb_intr, mcb_ind;
  logic intr = 1'b0, us_tick = 1'b0;
  sts_t sts = '0;
  cfg_t cfg;
  logic pm_wr, dt_wr, tc_load, xb_start, pcstate_wr;
  logic [15:0] pm_wdata, dt_wdata;
  int checks = 0, failures = 0;
  int n_pm = 0, n_dt = 0, n_tc = 0, n_xb = 0, n_pcs = 0, n_intr = 0;

  mcb_regs dut (.*);
  always #15 mcb_clk = ~mcb_clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge mcb_clk) begin
    if (pm_wr) n_pm++;
    if (dt_wr) n_dt++;
    if (tc_load) n_tc++;
    if (xb_start) n_xb++;
    if (pcstate_wr) n_pcs++;
    if (mcb_intr) n_intr++;
  end

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge mcb_clk);
    mcb_cs_n = 1'b0; mcb_rd_wr_n = 1'b0; mcb_addr = a; mcb_data_i = d;
    @(negedge mcb_clk);
    mcb_cs_n = 1'b1; mcb_rd_wr_n = 1'b1;
  endtask

  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge mcb_clk);
    mcb_cs_n = 1'b0; mcb_rd_wr_n = 1'b1; mcb_addr = a;
    @(negedge mcb_clk);
    checks++;
    if (mcb_data_oe !== 1'b1) begin failures++; $display("no output enable at %h", a); end
    d = mcb_data_o;
    mcb_cs_n = 1'b1;
    @(negedge mcb_clk);
    checks++;
    if (mcb_data_oe !== 1'b0) begin failures++; $display("output enable held at %h", a); end
  endtask

  task automatic expect_rd(input logic [7:0] a, input logic [15:0] e, input string what);
    logic [15:0] d;
    rd(a, d);
    checks++;
    if (d !== e) begin
      failures++;
      if (failures < 20) $display("%s (%h): read %h expected %h", what, a, d, e);
    end
  endtask

  // read/write registers and the bits that are stored
  logic [7:0]  rw_a [$] = '{8'h01, 8'h02, 8'h03, 8'h0E, 8'h13, 8'h14, 8'h15, 8'h16,
                           8'h39, 8'h3A, 8'h3B, 8'h3C, 8'h3D, 8'h3E, 8'h3F, 8'h40,
                           8'h47, 8'h4D, 8'h54, 8'h25, 8'h30, 8'h36, 8'h4E, 8'h52,
                           8'h60};
  logic [15:0] rw_m [$] = '{16'h3F3F, 16'h3F3F, 16'h0077, 16'h1F1F, 16'hFFFF, 16'h07FF,
                           16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF, 16'h4343, 16'hFFFF,
                           16'h07FF, 16'hFFFF, 16'h001F, 16'hFFFF, 16'h1F1F, 16'h000F,
                           16'hFFFF, 16'h1F1F, 16'h1F1F, 16'h1F1F, 16'hFFFF, 16'h00FF,
                           16'h0001};

  initial begin
    logic [15:0] d, shadow [256];
    repeat (2) @(negedge mcb_clk);
    por_n = 1'b1; rst_n = 1'b1;
    @(negedge mcb_clk) n_intr = 0;
    expect_rd(A_DESIGNID, 16'h0110, "DESIGNID");
    expect_rd(A_PLEN0, 16'h1FFF, "PLEN0");
    expect_rd(A_PLEN1, 16'h07A1, "PLEN1");
    expect_rd(A_TLEN0, 16'h87FF, "TLEN0");
    expect_rd(A_TLEN1, 16'h0013, "TLEN1");
    expect_rd(8'h61, 16'h0000, "unused");

    // random write and read-back
    foreach (rw_a[i]) begin
      shadow[rw_a[i]] = 16'($urandom) & rw_m[i];
      wr(rw_a[i], shadow[rw_a[i]] | ~rw_m[i]);
      shadow[rw_a[i]] = (shadow[rw_a[i]] | ~rw_m[i]) & rw_m[i];
    end
    for (int n = 0; n < 400; n++) begin
      int i;
      i = $urandom_range(rw_a.size() - 1);
      if ($urandom_range(1)) begin
        d = 16'($urandom);
        wr(rw_a[i], d);
        shadow[rw_a[i]] = d & rw_m[i];
      end else
        expect_rd(rw_a[i], shadow[rw_a[i]], "read-back");
    end
    checks += 6;
    if (cfg.ppsdly !== {shadow[8'h14][10:0], shadow[8'h13]}) begin failures++; $display("cfg.ppsdly"); end
    if (cfg.sysdly !== {shadow[8'h60][0], shadow[8'h15]}) begin failures++; $display("cfg.sysdly"); end
    if (cfg.ppslen !== {shadow[8'h3D][10:0], shadow[8'h3C]}) begin failures++; $display("cfg.ppslen"); end
    if (cfg.ticklen !== {shadow[8'h3F][4:0], shadow[8'h3E]}) begin failures++; $display("cfg.ticklen"); end
    if (cfg.swcfg_a[11] !== shadow[8'h30][4:0]) begin failures++; $display("cfg.swcfg_a"); end
    if (cfg.dtswitch[17] !== shadow[8'h52][7:4]) begin failures++; $display("cfg.dtswitch"); end

    // STATUS XOR and monitor values
    for (int n = 0; n < 20; n++) begin
      logic [15:0] x;
      for (int b = 0; b < $bits(sts); b++) sts[b] = 1'($urandom);
      x = 16'($urandom);
      wr(8'h1C, x);
      expect_rd(8'h1C, x ^ sts.sind_err_a[15:0], "STATUS1");
      wr(8'h1F, x);
      expect_rd(8'h1F, x ^ {4'b0, sts.dt_errs, 3'b0, sts.pm_errs}, "STATUS4");
      expect_rd(A_PPSCNT0, sts.ppscnt[15:0], "PPSCNT0");
      expect_rd(A_PPSCNT1, {4'b0, sts.ppscnt[27:16]}, "PPSCNT1");
      expect_rd(A_TCOUNT, {9'b0, sts.tcount}, "TCOUNT");
      expect_rd(8'h5D, sts.tog_s, "TOGCOUNT S");
      d = 16'($urandom_range(15));
      wr(A_DTSELECT, d);
      expect_rd(A_DTWADDR, {1'b0, sts.dt_waddr[d[3:0]]}, "DTWADDR");
      expect_rd(A_DTTRIGCNT1, {11'b0, sts.dt_trigcnt[d[3:0]][20:16]}, "DTTRIGCNT1");
    end

    // CONTROL per generator, kept through rst_n, cleared by por_n
    wr(A_DTSELECT, 16'd3);
    wr(A_CONTROL, 16'h0040);          // DT-Arm for generator 3
    wr(A_DTSELECT, 16'd7);
    wr(A_CONTROL, 16'h0020);          // DT-Clr for generator 7
    checks += 2;
    if (cfg.dt_arm !== 16'h0008) begin failures++; $display("dt_arm %h", cfg.dt_arm); end
    if (cfg.dt_clr !== 16'h0080) begin failures++; $display("dt_clr %h", cfg.dt_clr); end
    wr(A_DTSELECT, 16'd3);
    expect_rd(A_CONTROL, 16'h0040, "CONTROL of generator 3");
    wr(A_CONTROL, 16'h0210);          // PM-En, INTR-En
    @(negedge mcb_clk) rst_n = 1'b0;
    @(negedge mcb_clk) rst_n = 1'b1;
    checks += 2;
    if (cfg.pm_en !== 1'b1 || cfg.intr_en !== 1'b1) begin failures++; $display("CONTROL lost at rst_n"); end
    if (cfg.dtsel !== 4'd0) begin failures++; $display("DTSELECT kept at rst_n"); end

    // strobes
    n_pm = 0; n_dt = 0; n_tc = 0; n_xb = 0; n_pcs = 0;
    wr(A_PMPORT, 16'hA5C3);
    checks++; if (pm_wdata !== 16'hA5C3) failures++;
    wr(A_DTPORT, 16'h3C5A);
    checks++; if (dt_wdata !== 16'h3C5A) failures++;
    wr(A_XBDATA, 16'h1234);
    wr(A_TCSTAMP2, 16'h0405);
    wr(A_PCSTATE, 16'h1009);
    @(negedge mcb_clk);
    checks += 6;
    if (n_pm != 1 || n_dt != 1 || n_xb != 1 || n_tc != 1 || n_pcs != 1) begin
      failures++; $display("strobe counts %0d %0d %0d %0d %0d", n_pm, n_dt, n_xb, n_tc, n_pcs);
    end
    if (cfg.man_sel !== 1'b1 || cfg.man_dat_sel !== 2'd2 || cfg.man_clk_sel !== 2'd1) begin
      failures++; $display("PCSTATE fields");
    end
    if (cfg.tc_tcount !== 10'h005 || cfg.tc_epoch !== 3'd1) begin failures++; $display("TCSTAMP2 fields"); end
    if (cfg.xb_data !== 16'h1234) failures++;
    if (n_intr != 0) failures++;

    // interrupt
    @(negedge mcb_clk) intr = 1'b1;
    @(negedge mcb_clk) intr = 1'b0;
    expect_rd(A_INTRIND, 16'h0001, "INTRIND set");
    checks++; if (n_intr != 1) begin failures++; $display("mcb_intr count %0d", n_intr); end
    wr(A_INTRIND, 16'h0000);
    expect_rd(A_INTRIND, 16'h0000, "INTRIND cleared");
    wr(A_CONTROL, 16'h0000);
    @(negedge mcb_clk) intr = 1'b1;
    @(negedge mcb_clk) intr = 1'b0;
    checks++; if (n_intr != 1) begin failures++; $display("mcb_intr without INTR-En"); end

    // timer
    begin
      logic [15:0] t0, t1;
      int k;
      rd(A_TIMER0, t0);
      k = $urandom_range(5, 40);
      repeat (k) begin
        @(negedge mcb_clk) us_tick = 1'b1;
        @(negedge mcb_clk) us_tick = 1'b0;
      end
      rd(A_TIMER0, t1);
      checks++;
      if (t1 - t0 != 16'(k)) begin failures++; $display("TIMER advanced %0d for %0d", t1 - t0, k); end
    end

    // configuration reset clears CONTROL
    wr(A_CONTROL, 16'h0210);
    @(negedge mcb_clk) por_n = 1'b0;
    @(negedge mcb_clk) por_n = 1'b1;
    checks++;
    if (cfg.pm_en !== 1'b0 || cfg.intr_en !== 1'b0) begin failures++; $display("CONTROL kept at por_n"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
