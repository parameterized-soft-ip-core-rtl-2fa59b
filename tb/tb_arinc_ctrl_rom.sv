// Testbench for arinc_ctrl_rom: loads an image whose byte i is (7*i+3) mod 256
// and reads all 128 addresses; also checks the first bytes of the default
// firmware image against its hand-encoded first instruction (Jb 16, 0x18).
module tb_arinc_ctrl_rom;
  function automatic logic [1023:0] img();
    logic [1023:0] m;
    for (int i = 0; i < 128; i++) m[8*i +: 8] = 8'((7*i + 3) % 256);
    return m;
  endfunction
  logic [6:0] a; logic [7:0] d, dfw;
  int checks = 0, failures = 0;

  arinc_ctrl_rom #(.ROM_BYTES(128), .IMAGE(img())) dut (.addr(a), .data(d));
  arinc_ctrl_rom dut_fw (.addr(a), .data(dfw));

  initial begin
    #100000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      a = 7'(i); #1;
      checks++; if (d != 8'((7*i + 3) % 256)) begin failures++; $display("FAIL addr %0d", i); end
    end
    a = 0; #1; checks++; if (dfw != 8'h90) begin failures++; $display("FAIL fw byte0 %h", dfw); end
    a = 1; #1; checks++; if (dfw != 8'h98) begin failures++; $display("FAIL fw byte1 %h", dfw); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
