// tfpga_pkg: constants, types and the CRC-4 function shared by the
// Station Board Timing FPGA blocks.
//
// The CRC-4 uses the generator pattern 10011 (x^4 + x + 1) given for the
// time code. It is computed as a shift register starting from zero, one bit
// at a time, and sent most significant bit first, so that running the same
// CRC over a frame followed by its CRC gives zero. Start value and bit order
// are this design's choice; the polynomial is the specification's. The
// same CRC is used for every serial frame this design builds (PHASEMOD,
// DUMPTRIG, TIMECODE, PHASERR and COMMAND) because the specification names
// no other.
package tfpga_pkg;

  // Number of sub-band pairs (control outputs, phase error inputs per baseband).
  localparam int NUM_SB = 18;

  // Normal PPS and TICK periods in 128 MHz clocks, minus one (PLEN/TLEN reset values).
  localparam logic [26:0] PPSLEN_DEFAULT  = 27'h7A11FFF;  // 127999999
  localparam logic [20:0] TICKLEN_DEFAULT = 21'h1387FF;   // 1279999

  // PPSCODE frame layout (bit numbers counted from the T bit).
  localparam int PC_T_BIT     = 0;
  localparam int PC_SEC_LSB   = 1;   // COUNTPPS, 6 bits
  localparam int PC_UNUSED    = 7;   // 4 bits, 1010 (bit 7 = 1)
  localparam int PC_HOP_LSB   = 11;  // COUNTHOP, 8 bits
  localparam int PC_CRC_LSB   = 19;  // CRC-4, 4 bits
  localparam int PC_FRAME_LEN = 23;  // T bit .. last CRC bit
  localparam int PC_REPEAT_DLY = 18; // PPSCODE delay through one board, 128 MHz clocks

  // Instruction word commands for the PHASEMOD and DUMPTRIG generators.
  typedef enum logic [4:0] {
    CMD_TRIG = 5'd0,   // DUMPTRIG only; reserved in PHASEMOD
    CMD_SBIT = 5'd1,
    CMD_DATA = 5'd2,
    CMD_CRC  = 5'd3,
    CMD_END  = 5'd4,
    CMD_NOP  = 5'd5,
    CMD_NOPL = 5'd6    // DUMPTRIG only; reserved in PHASEMOD
  } cmd_e;

  // State of the PHASEMOD and DUMPTRIG state machines.
  typedef enum logic [1:0] {
    GS_IDLE = 2'd0,
    GS_READ = 2'd1,
    GS_DATA = 2'd2,
    GS_NOP  = 2'd3
  } gen_state_e;

  // Board clock / PPSCODE source selection (PCSTATE CLK-Sel and DAT-Sel).
  typedef enum logic [1:0] {
    SRC_A   = 2'b00,
    SRC_B   = 2'b01,
    SRC_X   = 2'b10,
    SRC_OFF = 2'b11
  } src_e;

  // One step of the CRC-4 (generator 10011).
  function automatic logic [3:0] crc4_step(input logic [3:0] crc, input logic din);
    logic fb;
    fb = crc[3] ^ din;
    return {crc[2:0], 1'b0} ^ (fb ? 4'b0011 : 4'b0000);
  endfunction

  // Number of data bits sent for a 3-bit width field: width + 1.
  function automatic logic [3:0] width_bits(input logic [2:0] w);
    return {1'b0, w} + 4'd1;
  endfunction

  // MCB register addresses.
  localparam logic [7:0] A_DESIGNID  = 8'h00, A_TESTPIN0  = 8'h01, A_TESTPIN1  = 8'h02,
                         A_PECRCSEL  = 8'h03, A_PECRCA0   = 8'h04, A_PECRCB0   = 8'h09,
                         A_PTICKSEL  = 8'h0E, A_PTICKCNTA0= 8'h0F, A_PTICKCNTA1= 8'h10,
                         A_PTICKCNTB0= 8'h11, A_PTICKCNTB1= 8'h12, A_PPSDLY0   = 8'h13,
                         A_PPSDLY1   = 8'h14, A_SYSDLY    = 8'h15, A_INTDLY    = 8'h16,
                         A_TCSTAMP0  = 8'h17, A_TCSTAMP1  = 8'h18, A_TCSTAMP2  = 8'h19,
                         A_PPSCODE   = 8'h1A, A_STATUS0   = 8'h1B, A_STATUS4   = 8'h1F,
                         A_CONTROL   = 8'h20, A_DTWADDR   = 8'h21, A_DTRADDR   = 8'h22,
                         A_DTTRIGCNT0= 8'h23, A_DTTRIGCNT1= 8'h24, A_PESWCFG0  = 8'h25,
                         A_PMPORT    = 8'h37, A_DTPORT    = 8'h38, A_CLKSELA   = 8'h39,
                         A_CLKSELB   = 8'h3A, A_CLKSELABT = 8'h3B, A_PLEN0     = 8'h3C,
                         A_PLEN1     = 8'h3D, A_TLEN0     = 8'h3E, A_TLEN1     = 8'h3F,
                         A_MCBTEST   = 8'h40, A_INTRIND   = 8'h41, A_TIMER0    = 8'h42,
                         A_TIMER1    = 8'h43, A_PMWADDR   = 8'h44, A_PMRADDR   = 8'h45,
                         A_TCOUNT    = 8'h46, A_TPESEL    = 8'h47, A_TPEOUT    = 8'h48,
                         A_TIMOUTA0  = 8'h49, A_TIMOUTA1  = 8'h4A, A_TIMOUTB0  = 8'h4B,
                         A_TIMOUTB1  = 8'h4C, A_DTSELECT  = 8'h4D, A_DTSWITCH0 = 8'h4E,
                         A_PCSTATE   = 8'h53, A_CSRR      = 8'h54, A_PPSCNT0   = 8'h55,
                         A_PPSCNT1   = 8'h56, A_XBADDR    = 8'h57, A_XBDATA    = 8'h58,
                         A_PPSCODE_A = 8'h59, A_PPSCODE_B = 8'h5A, A_TOGCOUNT_A= 8'h5B,
                         A_PCCTLSTS  = 8'h5F, A_SYSDLY_MS = 8'h60;

  // Maximum number of DUMPTRIG generators (4-bit DTGEN fields).
  localparam int MAX_DT = 16;

  // Settings held in the MCB register file (MCB clock domain).
  typedef struct packed {
    logic [15:0]                   testpin0, testpin1;
    logic [2:0]                    bsel_a, bsel_b;
    logic [4:0]                    ptsel_a, ptsel_b;
    logic [1:0]                    ptmode_a, ptmode_b;
    logic [26:0]                   ppsdly;
    logic [16:0]                   sysdly;
    logic [15:0]                   intdly;
    logic                          tc_auto, tc_t, tc_c;
    logic [2:0]                    tc_epoch;
    logic [9:0]                    tc_tcount;
    logic [31:0]                   tc_scount;
    logic                          xb_err, pm_clr, pm_en, sys_sel, tx_bit, intr_en;
    logic                          rst_sw, pm_err, tc_err, pe_err, pll_rst;
    logic [MAX_DT-1:0]             dt_clr, dt_arm, dt_err;
    logic [NUM_SB-1:0][4:0]        swcfg_a, swcfg_b;
    logic [NUM_SB-1:0]             clksel_a, clksel_b;
    logic                          to_clk_a, to_clk_b;
    logic [26:0]                   ppslen;
    logic [20:0]                   ticklen;
    logic [4:0]                    tpesel_a, tpesel_b;
    logic [1:0]                    tomode_a, tomode_b;
    logic [3:0]                    dtsel;
    logic [NUM_SB-1:0][3:0]        dtswitch;
    logic                          man_sel, sel_rst;
    logic [1:0]                    man_clk_sel, man_dat_sel;
    logic [15:0]                   csrr;
    logic [4:0]                    xb_addr;
    logic [15:0]                   xb_data;
    logic [1:0]                    pc_ctl;
  } cfg_t;

  // Monitor values read through the MCB registers (already in the MCB domain).
  typedef struct packed {
    logic [NUM_SB-1:0][3:0]        pecrc_a, pecrc_b;
    logic [21:0]                   ptickcnt_a, ptickcnt_b;
    logic                          clktx_bad, xclk_bad, sclk_bad, stick_intv, spps_intv, stick_mis;
    logic                          clka_bad, clkb_bad, pcpps_intv, stick_bad, spps_bad;
    logic [NUM_SB-1:0]             sind_err_a, sind_err_b;
    logic [4:0]                    pm_errs;    // {PMW, PMR, PMS, PMF, PMC}
    logic [3:0]                    dt_errs;    // {DTR, DTS, DTT, DTC}
    logic [MAX_DT-1:0][14:0]       dt_waddr, dt_raddr;
    logic [MAX_DT-1:0][20:0]       dt_trigcnt;
    logic [11:0]                   pm_waddr, pm_raddr;
    logic [6:0]                    tcount;
    logic [15:0]                   tpeout;
    logic [21:0]                   timout_a, timout_b;
    logic [27:0]                   ppscnt;
    logic [1:0]                    clk_sel, dat_sel;
    logic                          sci_a, sci_b, ici_a, ici_b;
    logic                          bad_int_a, bad_int_b;
    logic [5:0]                    sec_a, sec_b;
    logic [7:0]                    hop_a, hop_b;
    logic                          crc_a, crc_b, ovf_a, ovf_b;
    logic [15:0]                   tog_a, tog_b, tog_s, tog_x;
    logic                          bad_a, bad_b, bad_s, bad_x;
    logic                          tc_cur_t;
    logic [9:0]                    tc_cur_tcount;
    logic [31:0]                   tc_cur_scount;
    logic                          xb_busy, xb_addr_err;
  } sts_t;

endpackage
