// sram_controller: derives every SRAM control signal from SCLK and chip select.
//
// The chip has no clock of its own. A transaction is two SPI frames sent while
// chip select (cs_n) is low; the cycle counter (ctr) says which SCLK cycle is
// in progress, and this block compares it against fixed cycle numbers to
// produce the array strobes:
//
//   falling edge, ctr = 1   latch the read/write bit (sdi[0]; 1 = read)
//   falling edge, ctr = 6   latch the 5-bit address (sdi[4:0]) for the decoders
//   read:  rising edge of cycle 7  pc high for one cycle
//          rising edge of cycle 8  wl, col, muxen, sae high for one cycle; the
//                                  MISO register loads on the falling edge of
//                                  cycle 9, while they are still high
//   write: rising edge of cycle 14 pc high for one cycle
//          rising edge of cycle 16 data latched from the MOSI register (plus the
//                                  bit arriving at that edge); wl, wr, col high
//                                  until chip select returns high
//
// The cycle numbers and the signal names follow the published read and write
// timing. When each one-cycle pulse ends (at the next rising edge), resetting
// all strobes asynchronously when chip select goes high, the reset values of
// the read/write bit (read) and the address (0), and the separate wr and rwn
// outputs are this design's reading of it. Nothing here writes the array
// unless a complete write frame has been received.
//
// Interface: sclk, cs_n, mosi, ctr[4:0], sdi[7:0] in; addr[4:0], data[7:0],
// rwn, and the strobe bundle ctrl (pc, wl, wr, col, muxen, sae) out.
module sram_controller
  import sram_pkg::*;
(
  input  logic              sclk,
  input  logic              cs_n,
  input  logic              mosi,   // the bit sampled at the same rising edge
  input  logic [CTR_W-1:0]  ctr,
  input  logic [DATA_W-1:0] sdi,    // MOSI shift register contents
  output logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data,
  output logic              rwn,    // latched opcode bit: 1 = read, 0 = write
  output sram_ctrl_t        ctrl
);

  op_e op;
  assign rwn = op;

  // Opcode and address are captured on falling edges, half a cycle after the
  // bit they need has been shifted in.
  always_ff @(negedge sclk or posedge cs_n) begin
    if (cs_n) begin
      op   <= OP_READ;
      addr <= '0;
    end else begin
      if (ctr == CYC_RW_LATCH)   op   <= op_e'(sdi[0]);
      if (ctr == CYC_ADDR_LATCH) addr <= sdi[ADDR_W-1:0];
    end
  end

  // Strobes change on rising edges and all drop as soon as chip select rises.
  always_ff @(posedge sclk or posedge cs_n) begin
    if (cs_n) begin
      ctrl <= '0;
    end else if (op == OP_READ) begin
      ctrl.pc    <= (ctr == CYC_RD_PC_ON);
      ctrl.wl    <= (ctr == CYC_RD_ACC_ON);
      ctrl.col   <= (ctr == CYC_RD_ACC_ON);
      ctrl.muxen <= (ctr == CYC_RD_ACC_ON);
      ctrl.sae   <= (ctr == CYC_RD_ACC_ON);
      ctrl.wr    <= 1'b0;
    end else begin
      ctrl.pc    <= (ctr == CYC_WR_PC_ON);
      ctrl.muxen <= 1'b0;
      ctrl.sae   <= 1'b0;
      if (ctr == CYC_WR_ACC_ON) begin
        ctrl.wl  <= 1'b1;
        ctrl.wr  <= 1'b1;
        ctrl.col <= 1'b1;
      end
    end
  end

  // Write data register: loaded at the last rising edge of the write frame.
  always_ff @(posedge sclk) begin
    if (!cs_n && op == OP_WRITE && ctr == CYC_WR_ACC_ON)
      data <= {sdi[DATA_W-2:0], mosi};
  end

  // Precharge and word line must never overlap, and the write drivers only
  // act together with the word line and column select.
  a_pc_wl_exclusive: assert property (@(negedge sclk) disable iff (cs_n)
                                      !(ctrl.pc && ctrl.wl));
  a_wr_with_wl:      assert property (@(negedge sclk) disable iff (cs_n)
                                      ctrl.wr |-> (ctrl.wl && ctrl.col));

endmodule
