// i2c_slave: generic I2C slave with triplicated configuration registers.
//
// Register space, addressed by an 8-bit register pointer:
//   0x00 .. N_CFG-1          configuration bytes, written by the I2C master
//                            and read by the chip (cfg); reset to CFG_DEFAULT
//   0x20 .. 0x20+N_STAT-1    status bytes, written by the chip (stat), read-only
//   0x30                     {CHIP_ID, CHIP_REV}, read-only
//   anything else            reads 0, writes are ignored
// Each configuration byte is held in three copies that are always written
// together; cfg is their bitwise majority, so one upset copy does not
// change the configuration.
//
// Protocol: standard 7-bit addressing. A write transaction is
// START, {dev_addr, 0}, pointer, data..., STOP; the slave acknowledges
// every byte and the pointer advances after each data byte. A read is
// START, {dev_addr, 1}, data... (from the current pointer, which advances
// after each byte) and ends when the master does not acknowledge. A
// repeated START begins a new transaction.
//
// Timing: scl and sda are sampled by clk through two-flip-flop
// synchronisers, so clk must be at least about 10x the SCL rate (the 40 MHz
// chip clock serves I2C up to a few MHz). The slave drives sda only low:
// sda_oe=1 means pull SDA low. rst_n resets asynchronously.
// From the design note: 32 configuration and 16 status bytes, chip ID and
// revision of 4 bits each, triplicated registers, the device addresses
// (given by the instantiating block). This design's choices: the pointer
// protocol, the status and ID addresses, oversampling with clk.
module i2c_slave #(
  parameter int unsigned           N_CFG       = 32,
  parameter int unsigned           N_STAT      = 16,
  parameter logic [N_CFG*8-1:0]    CFG_DEFAULT = '0,
  parameter logic [3:0]            CHIP_ID     = 4'h1,
  parameter logic [3:0]            CHIP_REV    = 4'h0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [6:0]            dev_addr,
  input  logic                  scl,
  input  logic                  sda_in,
  output logic                  sda_oe,
  output logic [N_CFG*8-1:0]    cfg,
  input  logic [N_STAT*8-1:0]   stat
);

  localparam logic [7:0] STAT_BASE = 8'h20;
  localparam logic [7:0] ID_ADDR   = 8'h30;

  typedef enum logic [2:0] {P_IDLE, P_DEV, P_PTR, P_WDATA, P_RDATA} phase_t;

  logic [2:0] scl_s, sda_s;
  logic       scl_rise, scl_fall, start_c, stop_c;
  phase_t     phase;
  logic [3:0] bitcnt;
  logic       ack_slot;
  logic       rw;
  logic [7:0] sh;
  logic [7:0] tx;
  logic       tx_en;
  logic       ack_drv;
  logic       nack;
  logic [7:0] ptr;

  logic [N_CFG*8-1:0] cfg_a, cfg_b, cfg_c;

  // Synchronise and find edges.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= '1;
      sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda_in};
    end
  end

  assign scl_rise = scl_s[1] & ~scl_s[2];
  assign scl_fall = ~scl_s[1] & scl_s[2];
  assign start_c  = scl_s[1] & scl_s[2] & ~sda_s[1] & sda_s[2];
  assign stop_c   = scl_s[1] & scl_s[2] & sda_s[1] & ~sda_s[2];

  assign cfg = (cfg_a & cfg_b) | (cfg_b & cfg_c) | (cfg_a & cfg_c);

  function automatic logic [7:0] read_byte(input logic [7:0] p);
    logic [7:0] r;
    r = 8'h00;
    if (p < 8'(N_CFG))                                r = cfg[p*8 +: 8];
    else if (p >= STAT_BASE && p < STAT_BASE + 8'(N_STAT))
                                                      r = stat[(p - STAT_BASE)*8 +: 8];
    else if (p == ID_ADDR)                            r = {CHIP_ID, CHIP_REV};
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= P_IDLE;
      bitcnt   <= '0;
      ack_slot <= 1'b0;
      rw       <= 1'b0;
      sh       <= '0;
      tx       <= '0;
      tx_en    <= 1'b0;
      ack_drv  <= 1'b0;
      nack     <= 1'b0;
      ptr      <= '0;
      cfg_a    <= CFG_DEFAULT;
      cfg_b    <= CFG_DEFAULT;
      cfg_c    <= CFG_DEFAULT;
    end else if (start_c) begin
      phase    <= P_DEV;
      bitcnt   <= '0;
      ack_slot <= 1'b0;
      tx_en    <= 1'b0;
      ack_drv  <= 1'b0;
    end else if (stop_c) begin
      phase    <= P_IDLE;
      ack_slot <= 1'b0;
      tx_en    <= 1'b0;
      ack_drv  <= 1'b0;
    end else if (phase != P_IDLE) begin
      if (scl_rise) begin
        if (ack_slot) begin
          if (phase == P_RDATA) nack <= sda_s[1];
        end else begin
          sh     <= {sh[6:0], sda_s[1]};
          bitcnt <= bitcnt + 4'd1;
        end
      end else if (scl_fall) begin
        if (!ack_slot && bitcnt == 4'd8) begin
          // End of a byte: the 9th clock is the acknowledge.
          ack_slot <= 1'b1;
          bitcnt   <= '0;
          tx_en    <= 1'b0;
          unique case (phase)
            P_DEV: begin
              if (sh[7:1] == dev_addr) begin
                ack_drv <= 1'b1;
                rw      <= sh[0];
              end else begin
                phase    <= P_IDLE;
                ack_slot <= 1'b0;
              end
            end
            P_PTR: begin
              ptr     <= sh;
              ack_drv <= 1'b1;
            end
            P_WDATA: begin
              if (ptr < 8'(N_CFG)) begin
                cfg_a[ptr*8 +: 8] <= sh;
                cfg_b[ptr*8 +: 8] <= sh;
                cfg_c[ptr*8 +: 8] <= sh;
              end
              ptr     <= ptr + 8'd1;
              ack_drv <= 1'b1;
            end
            P_RDATA: begin
              ptr     <= ptr + 8'd1;
              ack_drv <= 1'b0;
            end
            default: ;
          endcase
        end else if (ack_slot) begin
          // End of the acknowledge clock.
          ack_slot <= 1'b0;
          ack_drv  <= 1'b0;
          unique case (phase)
            P_DEV: begin
              if (rw) begin
                phase <= P_RDATA;
                tx    <= read_byte(ptr);
                tx_en <= 1'b1;
              end else begin
                phase <= P_PTR;
              end
            end
            P_PTR:   phase <= P_WDATA;
            P_WDATA: ;
            P_RDATA: begin
              if (nack) phase <= P_IDLE;
              else begin
                tx    <= read_byte(ptr);
                tx_en <= 1'b1;
              end
            end
            default: ;
          endcase
        end else if (phase == P_RDATA && tx_en) begin
          tx <= {tx[6:0], 1'b1};
        end
      end
    end
  end

  assign sda_oe = ack_drv | (tx_en & ~tx[7]);

endmodule
