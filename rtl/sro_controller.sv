// sro_controller: the simple-readout (SRO) controller of the 4x4 array.
//
// Capture: while no frame is being sent, we=1 and the shared buffer address
// addr advances by one every clock, so each pixel's 256-word hit buffer
// holds the last 256 words of its data. A 12-bit BCID counter also advances
// every clock and is cleared by bc0.
//
// Frame: on a clock edge that samples l1acc=1 during capture, we drops, the
// ROI mask is captured and dout presents the start-of-frame word
// {18'h25555, BCID} (the BCID value sampled at that edge is the L1ACC_ID).
// Then, for each pixel enabled in the ROI, taken in the order
// 15,11,7,3,14,10,6,2,13,9,5,1,12,8,4,0, the controller drives that pixel's
// row enable oe[row] and selects its column bus for 256 clocks; since addr
// keeps advancing, each pixel's buffer is read once round, oldest word
// first. After the last word dout presents EOF 30'h2EADBEFF for one clock,
// then dout returns to 0 and we returns to 1. A frame holds
// 2 + 256 * popcount(ROI) words; with ROI=0 it is SOF then EOF.
//
// Timing: dout is registered; a word read from the buffers appears on dout
// one clock after its address was presented. oe is one-hot or zero.
// Design note: frame format, order, BCID/L1ACC_ID behaviour, buffer
// organisation. This design's choices: the address runs freely (it keeps
// counting through the frame, which makes the read loop start at the
// oldest word), l1acc is ignored while a frame is being sent, ROI is
// sampled at l1acc, reset is asynchronous and active low.
module sro_controller
  import etroc1_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bc0,
  input  logic              l1acc,
  input  logic [NPIX-1:0]   roi,
  input  word_t             col_bus [NCOL],
  output logic              we,
  output logic [NROW-1:0]   oe,
  output logic [7:0]        addr,
  output word_t             dout,
  output logic [BCID_W-1:0] bcid,
  output logic              busy
);

  typedef enum logic [1:0] {S_CAPTURE, S_BODY, S_TRAIL, S_DONE} state_t;

  state_t          state;
  logic [NPIX-1:0] roi_q;
  logic [3:0]      k_cur;   // position in the readout order
  logic [7:0]      wcnt;    // words sent for the current pixel
  logic [3:0]      pix_cur;

  // First position >= start whose pixel is enabled in mask.
  function automatic logic [4:0] find_next(input logic [NPIX-1:0] mask,
                                           input logic [4:0] start);
    logic [4:0] r;
    r = 5'd16;
    for (int k = 15; k >= 0; k--) begin
      if (5'(k) >= start && mask[sro_order(4'(k))]) r = 5'(k);
    end
    return r;
  endfunction

  logic [4:0] first_k, next_k;
  assign first_k = find_next(roi, 5'd0);
  assign next_k  = find_next(roi_q, {1'b0, k_cur} + 5'd1);
  assign pix_cur = sro_order(k_cur);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid <= '0;
      addr <= '0;
    end else begin
      bcid <= bc0 ? '0 : bcid + 1'b1;
      addr <= addr + 8'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CAPTURE;
      roi_q <= '0;
      k_cur <= '0;
      wcnt  <= '0;
      dout  <= '0;
    end else begin
      unique case (state)
        S_CAPTURE: begin
          dout <= '0;
          if (l1acc) begin
            dout  <= {SOF_HEADER, bcid};
            roi_q <= roi;
            wcnt  <= '0;
            if (first_k[4]) state <= S_TRAIL;
            else begin
              k_cur <= first_k[3:0];
              state <= S_BODY;
            end
          end
        end
        S_BODY: begin
          dout <= col_bus[pix_cur[3:2]];
          wcnt <= wcnt + 8'd1;
          if (wcnt == 8'(BUF_DEPTH - 1)) begin
            if (next_k[4]) state <= S_TRAIL;
            else           k_cur <= next_k[3:0];
          end
        end
        S_TRAIL: begin
          dout  <= EOF_WORD;
          state <= S_DONE;
        end
        S_DONE: begin
          dout  <= '0;
          state <= S_CAPTURE;
        end
        default: state <= S_CAPTURE;
      endcase
    end
  end

  assign we   = (state == S_CAPTURE);
  assign busy = (state != S_CAPTURE);

  always_comb begin
    oe = '0;
    if (state == S_BODY) oe[pix_cur[1:0]] = 1'b1;
  end

  a_oe_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                               (oe & (oe - 1'b1)) == '0);
  a_no_write_in_frame: assert property (@(posedge clk) disable iff (!rst_n)
                                        (state == S_BODY) |-> !we);

endmodule
