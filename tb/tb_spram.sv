// tb_spram: self-checking test of the single-port target RAM (3 lanes of
// 44 bits, 16 addresses) against an array model.
//
// Random lane writes and whole-word reads; each read must return, one
// cycle later, the last value written to every lane of that address, and
// dout must hold its value while the RAM is not read.
`timescale 1ns/1ps
module tb_spram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0;
  logic [2:0] lane_we = 0;
  logic [3:0] addr = 0;
  logic [43:0] din = 0;
  logic [2:0][43:0] dout;

  spram #(.W(44), .LANES(3), .DEPTH(16)) dut (.*);

  int checks = 0, failures = 0;
  logic [2:0][43:0] model [16];
  logic [2:0][43:0] last_read;
  logic was_read = 0;

  initial begin
    // initialise every word
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      en = 1; lane_we = 3'b111; addr = 4'(a); din = 44'(a * 3 + 1);
      model[a] = {3{44'(a * 3 + 1)}};
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (was_read) begin
        checks++;
        if (dout != last_read) begin failures++; if (failures < 10) $display("read mismatch at %0d", n); end
      end
      en = ($urandom_range(0, 4) != 0);
      addr = 4'($urandom_range(0, 15));
      din = {$urandom, 12'($urandom)};
      lane_we = ($urandom_range(0, 1) == 0) ? 3'($urandom_range(1, 7)) : 3'b000;
      if (en && lane_we == 0) begin
        last_read = model[addr];
        was_read = 1;
      end else if (en) begin
        for (int l = 0; l < 3; l++) if (lane_we[l]) model[addr][l] = din;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
