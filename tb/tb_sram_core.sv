// tb_sram_core: checks the memory macro driven directly by its strobes.
//
// Applies the strobe sequences the controller produces: a write is wl, wr and
// col high together then all low; a read is a pc pulse followed by wl, col,
// muxen and sae high together then low. Writes every address, then runs 800
// random reads and writes; each read's sense-amplifier output, sampled after
// the strobes have fallen, is compared with a 32-byte reference.
module tb_sram_core;
  import sram_pkg::*;
  logic [4:0] addr;
  logic [7:0] data, dsns;
  sram_ctrl_t ctrl;
  logic [7:0] ref_mem [32];
  int checks = 0, failures = 0;

  sram_core dut (.addr(addr), .data(data), .ctrl(ctrl), .dsns(dsns));

  task automatic write_byte(input logic [4:0] a, input logic [7:0] d);
    addr = a; data = d;
    #10 ctrl = '{pc: 1'b1, default: 1'b0};
    #10 ctrl = '0;
    #10 ctrl = '{wl: 1'b1, wr: 1'b1, col: 1'b1, default: 1'b0};
    #10 ctrl = '0;
    data = ~d;
    #10;
    ref_mem[a] = d;
  endtask

  task automatic read_byte(input logic [4:0] a);
    addr = a;
    #10 ctrl = '{pc: 1'b1, default: 1'b0};
    #10 ctrl = '0;
    ctrl = '{wl: 1'b1, col: 1'b1, muxen: 1'b1, sae: 1'b1, default: 1'b0};
    #10 ctrl = '0;
    #10;
    checks++;
    if (dsns != ref_mem[a]) begin
      failures++;
      $display("FAIL: addr %0d read %02h expected %02h", a, dsns, ref_mem[a]);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0; addr = '0; data = '0;
    for (int i = 0; i < 32; i++) write_byte(5'(i), 8'($urandom));
    for (int i = 0; i < 32; i++) read_byte(5'(i));
    for (int n = 0; n < 800; n++) begin
      if ($urandom % 2) write_byte(5'($urandom), 8'($urandom));
      else              read_byte(5'($urandom));
    end
    for (int i = 0; i < 32; i++) read_byte(5'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
