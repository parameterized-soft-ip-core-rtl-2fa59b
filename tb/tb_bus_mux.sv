// Testbench for bus_mux: address bit 3 selects the ARINC module or the UART,
// read data comes from the selected block (UART zero-extended), nothing is
// selected without chip select, and the pad output enable follows cs && rd.
module tb_bus_mux;
  logic cs, rd; logic [3:0] addr; logic asel, usel, oe; logic [15:0] ard, rdata; logic [7:0] urd;
  int checks = 0, failures = 0;

  bus_mux dut (.cs(cs), .rd(rd), .addr(addr), .arinc_sel(asel), .uart_sel(usel), .arinc_rdata(ard),
    .uart_rdata(urd), .rdata(rdata), .rdata_oe(oe));

  initial begin
    #100000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      cs = 1'($urandom); rd = 1'($urandom); addr = 4'($urandom); ard = 16'($urandom); urd = 8'($urandom);
      #1;
      checks++;
      if (asel != (cs && addr < 8) || usel != (cs && addr >= 8) || oe != (cs && rd) ||
          (cs && addr < 8 && rdata != ard) || (cs && addr >= 8 && rdata != {8'h00, urd})) begin
        failures++; $display("FAIL: cs=%b addr=%0d", cs, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
