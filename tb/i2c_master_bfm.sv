// i2c_master_bfm: behavioural I2C master used by the testbenches.
//
// Drives scl and pulls sda low when sending a 0; the open-drain line value
// is sda = sda_m & ~slave_oe. HP is half an SCL period in simulation time
// units. Tasks:
//   write_bytes(dev, ptr, data, n, ack_ok)  START dev+W ptr data[0..n-1] STOP
//   read_bytes(dev, ptr, data, n, ack_ok)   write the pointer, then
//                                           START dev+R, n bytes, NACK, STOP
// ack_ok is 1 when the slave acknowledged every byte it should have.
module i2c_master_bfm #(
  parameter int HP = 64
) (
  output logic scl,
  output logic sda,
  input  logic slave_oe
);

  logic sda_m;
  logic [7:0] rd_buf [64];   // copy of the last read_bytes() data
  initial begin
    scl   = 1'b1;
    sda_m = 1'b1;
  end
  assign sda = sda_m & ~slave_oe;

  task automatic start_c();
    sda_m = 1'b1;
    #(HP) scl = 1'b1;
    #(HP) sda_m = 1'b0;
    #(HP) scl = 1'b0;
  endtask

  task automatic stop_c();
    #(HP/2) sda_m = 1'b0;
    #(HP/2) scl = 1'b1;
    #(HP) sda_m = 1'b1;
    #(HP);
  endtask

  task automatic send_byte(input logic [7:0] b, output logic ack);
    for (int i = 7; i >= 0; i--) begin
      #(HP/2) sda_m = b[i];
      #(HP/2) scl = 1'b1;
      #(HP)   scl = 1'b0;
    end
    #(HP/2) sda_m = 1'b1;
    #(HP/2) scl = 1'b1;
    ack = ~sda;
    #(HP)   scl = 1'b0;
  endtask

  task automatic recv_byte(output logic [7:0] b, input logic give_ack);
    sda_m = 1'b1;
    for (int i = 7; i >= 0; i--) begin
      #(HP) scl = 1'b1;
      b[i] = sda;
      #(HP) scl = 1'b0;
    end
    #(HP/2) sda_m = ~give_ack;
    #(HP/2) scl = 1'b1;
    #(HP)   scl = 1'b0;
    #(HP/2) sda_m = 1'b1;
  endtask

  task automatic write_bytes(input logic [6:0] dev, input logic [7:0] ptr,
                             input logic [7:0] data [64], input int n,
                             output logic ack_ok);
    logic a;
    ack_ok = 1'b1;
    start_c();
    send_byte({dev, 1'b0}, a); ack_ok &= a;
    send_byte(ptr, a);         ack_ok &= a;
    for (int i = 0; i < n; i++) begin
      send_byte(data[i], a);   ack_ok &= a;
    end
    stop_c();
  endtask

  task automatic read_bytes(input logic [6:0] dev, input logic [7:0] ptr,
                            output logic [7:0] data [64], input int n,
                            output logic ack_ok);
    logic a;
    ack_ok = 1'b1;
    start_c();
    send_byte({dev, 1'b0}, a); ack_ok &= a;
    send_byte(ptr, a);         ack_ok &= a;
    start_c();                 // repeated START
    send_byte({dev, 1'b1}, a); ack_ok &= a;
    for (int i = 0; i < n; i++) begin
      logic [7:0] b;
      recv_byte(b, i != n - 1);
      rd_buf[i] = b;
      data[i]   = b;
    end
    stop_c();
  endtask

  // Single-byte helpers.
  task automatic write_reg(input logic [6:0] dev, input logic [7:0] ptr,
                           input logic [7:0] val, output logic ack_ok);
    logic [7:0] d [64];
    d = '{default: 8'h00};
    d[0] = val;
    write_bytes(dev, ptr, d, 1, ack_ok);
  endtask

  task automatic read_reg(input logic [6:0] dev, input logic [7:0] ptr,
                          output logic [7:0] val, output logic ack_ok);
    logic [7:0] d [64];
    read_bytes(dev, ptr, d, 1, ack_ok);
    val = d[0];
  endtask

endmodule
