// tdc_mon_regs: the read-only status bytes of the TDC test block.
//
// Maps the TDC monitor signals onto the 16 status bytes (registers
// 0x20..0x2F) of the block's I2C slave. raw_sel (register TDCRawData_Sel)
// chooses between two views: 0 shows the calibration counters, the
// TOT/TOA/Cal codes and the calibration raw data, 1 shows the TOA counters
// and the TOA and TOT raw data. Register 0x29 (TOT counters, TOT error,
// hit flag) is the same in both views, and 0x2F reads 0. Purely
// combinational. The byte layout is the design note's read-only register
// table; the zero padding of unused bits is this design's choice.
module tdc_mon_regs
  import etroc1_pkg::*;
(
  input  tdc_mon_t      mon,
  input  logic          raw_sel,
  output logic [127:0]  stat
);

  logic [7:0] b [16];

  always_comb begin
    if (!raw_sel) begin
      b[0]  = {1'b0, mon.cal_err, mon.cal_cnt_a, mon.cal_cnt_b};
      b[1]  = mon.tot_code[7:0];
      b[2]  = {mon.toa_code[6:0], mon.tot_code[8]};
      b[3]  = {mon.cal_code[4:0], mon.toa_code[9:7]};
      b[4]  = {mon.cal_raw[31:29], mon.cal_code[9:5]};
      b[5]  = mon.cal_raw[39:32];
      b[6]  = mon.cal_raw[47:40];
      b[7]  = mon.cal_raw[55:48];
      b[8]  = {1'b0, mon.cal_raw[62:56]};
      b[10] = mon.cal_raw[7:0];
      b[11] = mon.cal_raw[15:8];
      b[12] = mon.cal_raw[23:16];
      b[13] = {3'b000, mon.cal_raw[28:24]};
      b[14] = {2'b00, mon.dbf_qc};
    end else begin
      b[0]  = {1'b0, mon.toa_err, mon.toa_cnt_a, mon.toa_cnt_b};
      b[1]  = mon.toa_raw[7:0];
      b[2]  = mon.toa_raw[15:8];
      b[3]  = mon.toa_raw[23:16];
      b[4]  = mon.toa_raw[31:24];
      b[5]  = mon.toa_raw[39:32];
      b[6]  = mon.toa_raw[47:40];
      b[7]  = mon.toa_raw[55:48];
      b[8]  = {1'b0, mon.toa_raw[62:56]};
      b[10] = mon.tot_raw[7:0];
      b[11] = mon.tot_raw[15:8];
      b[12] = mon.tot_raw[23:16];
      b[13] = mon.tot_raw[31:24];
      b[14] = {2'b00, mon.ro_dbf_qc};
    end
    b[9]  = {mon.hit, mon.tot_err, mon.tot_cnt_a, mon.tot_cnt_b};
    b[15] = 8'h00;
    for (int i = 0; i < 16; i++) stat[8*i +: 8] = b[i];
  end

endmodule
