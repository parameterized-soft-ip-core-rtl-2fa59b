// Program ROM of the ARINC controller.
// ROM_BYTES bytes, read combinationally at the program counter. The contents
// come from the packed IMAGE parameter (byte i in bits 8*i+7:8*i); by default
// that is the ARINC module firmware. Size follows the design (128 bytes); the
// image is this design's own program.
module arinc_ctrl_rom #(
  parameter int unsigned ROM_BYTES = 128,
  parameter logic [8*ROM_BYTES-1:0] IMAGE = arinc_fw_pkg::FW_IMAGE,
  localparam int unsigned AW = $clog2(ROM_BYTES)
) (
  input  logic [AW-1:0] addr,
  output logic [7:0]    data
);
  logic [7:0] rom [ROM_BYTES];

  always_comb begin
    for (int i = 0; i < ROM_BYTES; i++) rom[i] = IMAGE[8*i +: 8];
  end

  assign data = rom[addr];
endmodule
