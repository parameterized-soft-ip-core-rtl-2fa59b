// UART error checker.
// Each time a complete frame reaches the receive shifter the frame's parity and
// framing errors are recorded, and an overrun is recorded if the receive FIFO
// is full so the byte is lost. The flags stay set until an error reset (or the
// UART reset). Checking the three errors per frame and the error reset follow
// the design; sticky flags are this design's choice.
module uart_err (
  input  logic clk,
  input  logic rst,
  input  logic frame_valid,
  input  logic frame_par_err,
  input  logic frame_frm_err,
  input  logic fifo_full,
  input  logic err_reset,
  output logic parity_err,
  output logic framing_err,
  output logic overrun_err
);
  always_ff @(posedge clk) begin
    if (rst || err_reset) begin
      parity_err  <= 1'b0;
      framing_err <= 1'b0;
      overrun_err <= 1'b0;
    end else if (frame_valid) begin
      if (frame_par_err) parity_err  <= 1'b1;
      if (frame_frm_err) framing_err <= 1'b1;
      if (fifo_full)     overrun_err <= 1'b1;
    end
  end
endmodule
