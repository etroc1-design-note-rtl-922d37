// etroc1_pkg: types, constants and small functions shared by the ETROC1
// digital blocks.
//
// - tdc_word_t: the 30-bit word a pixel TDC delivers (array and standalone
//   pixel order: TOT[8:0] | TOA[9:0] | Cal[9:0] | hitFlag, MSB first) and
//   tdc_test_word_t, the TDC test block order (hitFlag | Cal | TOA | TOT).
// - The simple-readout frame constants: a 30-bit SOF made of the 18-bit
//   header 18'h25555 and a 12-bit L1ACC_ID, and the 30-bit EOF 30'h2EADBEFF.
// - The 2-bit DMRO word header 2'b10.
// - scramble30(): the X^58+X^39+1 self-synchronising scrambler applied to a
//   30-bit word, bit 29 first (the serial order of the link).
// - prbs7_word(): 32 consecutive bits of the PRBS7 (x^7+x^6+1) sequence.
// - sro_order(): the fixed simple-readout pixel order 15,11,7,3,14,...,0.
// - pixel index = 4*column + row (pixel P_row_col).
// The frame constants, header, polynomials and order follow the design
// note; the bit order within the scrambler and PRBS words is this design's
// choice (MSB-first, matching the serial order).
package etroc1_pkg;

  localparam int unsigned WORD_W   = 30;  // TDC / readout word width
  localparam int unsigned NROW     = 4;
  localparam int unsigned NCOL     = 4;
  localparam int unsigned NPIX     = NROW * NCOL;
  localparam int unsigned BUF_DEPTH = 256;
  localparam int unsigned BCID_W   = 12;

  localparam logic [17:0] SOF_HEADER = 18'h25555;
  localparam logic [29:0] EOF_WORD   = 30'h2EADBEFF;
  localparam logic [1:0]  DMRO_HEADER = 2'b10;
  localparam logic [9:0]  ROTEST_FIXED = 10'b1010101010;


  // Power-up contents of the 32 configuration bytes of each I2C slave;
  // byte n sits at bits [8n+7:8n]. Values from the register tables.
  localparam logic [255:0] REGA_DEFAULT =
    256'hFFFF8020_08020080_20080200_80200802_00802008_02000000_01000111_FFFF37F8;
  localparam logic [255:0] REGB_DEFAULT =
    256'h00000000_00000000_00000000_00000000_00000000_77381818_38410300_0900011C;
  localparam logic [255:0] REGS_DEFAULT =   // standalone pixel
    256'h00000000_00000000_00000000_00000000_560037F8_77381818_38830300_0900011C;
  localparam logic [255:0] REGT_DEFAULT =   // TDC test block
    256'h00000000_00000000_00000000_00000000_00000002_3F383838_38031F51_09618000;

  // I2C device addresses: slave A is {5'b00000, A1, A0}, slave B is
  // {5'b11111, A1, A0}, the standalone pixel 7'b1001110 and the TDC test
  // block {6'b010001, A0}.
  localparam logic [4:0] I2C_A_PREFIX = 5'b00000;
  localparam logic [4:0] I2C_B_PREFIX = 5'b11111;
  localparam logic [6:0] I2C_S_ADDR   = 7'b1001110;
  localparam logic [5:0] I2C_T_PREFIX = 6'b010001;

  // Byte offsets of the register fields used by the digital logic.
  localparam int unsigned RA_EN_DISCRI = 'h04;
  localparam int unsigned RA_RO        = 'h07;  // OE_DMRO_Row, DMRO_COL, RO_SEL
  localparam int unsigned RA_VTHIN     = 'h0A;  // 16 x 10 bits
  localparam int unsigned RA_ROI       = 'h1E;  // 16 bits
  localparam int unsigned RB_TDC       = 'h00;  // bit 1 = enableMon
  localparam int unsigned RB_PHASEADJ  = 'h04;
  localparam int unsigned RB_REFSTR    = 'h05;
  localparam int unsigned RB_DMRO      = 'h06;

  typedef logic [WORD_W-1:0] word_t;

  typedef struct packed {
    logic [8:0] tot;
    logic [9:0] toa;
    logic [9:0] cal;
    logic       hit;
  } tdc_word_t;

  typedef struct packed {
    logic       hit;
    logic [9:0] cal;
    logic [9:0] toa;
    logic [8:0] tot;
  } tdc_test_word_t;


  // Monitor signals of the TDC in the TDC test block, read back through its
  // I2C status registers 0x20..0x2E.
  typedef struct packed {
    logic [2:0]  cal_cnt_a, cal_cnt_b;
    logic [2:0]  toa_cnt_a, toa_cnt_b;
    logic [2:0]  tot_cnt_a, tot_cnt_b;
    logic        cal_err, toa_err, tot_err, hit;
    logic [8:0]  tot_code;
    logic [9:0]  toa_code;
    logic [9:0]  cal_code;
    logic [62:0] cal_raw;
    logic [62:0] toa_raw;
    logic [31:0] tot_raw;
    logic [5:0]  dbf_qc;
    logic [5:0]  ro_dbf_qc;
  } tdc_mon_t;

  // Scramble one 30-bit word. state[0] holds the most recent scrambled bit,
  // state[38] the bit 39 positions back and state[57] the bit 58 back.
  function automatic logic [87:0] scramble30(input logic [29:0] d,
                                             input logic [57:0] state);
    logic [57:0] s;
    logic [29:0] o;
    s = state;
    for (int i = 29; i >= 0; i--) begin
      o[i] = d[i] ^ s[38] ^ s[57];
      s    = {s[56:0], o[i]};
    end
    return {s, o};  // {next state, scrambled word}
  endfunction

  // Advance a PRBS7 generator by 32 bits; the first generated bit lands in
  // bit 31 of the word.
  function automatic logic [38:0] prbs7_word(input logic [6:0] state);
    logic [6:0]  s;
    logic [31:0] w;
    s = state;
    for (int i = 31; i >= 0; i--) begin
      w[i] = s[6] ^ s[5];
      s    = {s[5:0], w[i]};
    end
    return {s, w};  // {next state, word}
  endfunction

  // k-th pixel of the simple-readout order (k = 0 is read first).
  function automatic logic [3:0] sro_order(input logic [3:0] k);
    return 4'd15 - {k[1:0], 2'b00} - {2'b00, k[3:2]};
  endfunction

endpackage
