// Testbench for arinc_rx with a tick every clock (10 clocks per bit). A
// behavioural line driver sends bipolar RZ words (5 clocks high on A or B, 5
// null, 4 null bit times between words). Checks received words in 32-bit mode,
// the parity-error flag in the last bit with odd parity, a deliberately bad
// parity word, 25-bit words, recovery from a truncated word through the gap,
// and the overrun flag when a word is not acknowledged.
module tb_arinc_rx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic w25 = 0, par_en = 0, par_even = 0, la = 0, lb = 0, ack = 0;
  logic ready, perr, ovr; logic [31:0] data;
  int checks = 0, failures = 0;

  arinc_rx dut (.clk(clk), .rst(rst), .tick(1'b1), .w25(w25), .par_en(par_en), .par_even(par_even),
    .line_a(la), .line_b(lb), .ack(ack), .ready(ready), .data(data), .par_err(perr), .overrun(ovr));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic line_word(input logic [31:0] w, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); la = w[i]; lb = !w[i];
      repeat (4) @(negedge clk);
      @(negedge clk); la = 0; lb = 0;
      repeat (4) @(negedge clk);
    end
    repeat (40) @(negedge clk);
  endtask

  task automatic take(input logic [31:0] exp_w, input bit exp_perr, input string what);
    check(ready, {what, ": ready"});
    check(data == exp_w, $sformatf("%s: data %h expected %h", what, data, exp_w));
    check(perr == exp_perr, {what, ": parity flag"});
    @(negedge clk); ack = 1; @(negedge clk); ack = 0;
    check(!ready, {what, ": ready cleared by ack"});
  endtask

  function automatic logic [31:0] with_odd(logic [31:0] w);
    w[31] = !(^w[30:0]);
    return w;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] w;
    repeat (2) @(posedge clk); rst = 0;
    repeat (30) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      w = $urandom; line_word(w, 32); take(w, 0, "32-bit");
    end
    par_en = 1;
    w = with_odd($urandom); line_word(w, 32);
    take({1'b0, w[30:0]}, 0, "odd parity good");
    w = with_odd($urandom); w[31] = !w[31]; line_word(w, 32);
    take({1'b1, w[30:0]}, 1, "odd parity bad");
    w25 = 1; par_en = 0;
    w = $urandom; line_word(w, 25); take({7'b0, w[24:0]}, 0, "25-bit");
    w25 = 0;
    // truncated word followed by a full one: the gap resynchronises
    w = $urandom; line_word(w, 12);
    check(!ready, "no word from a truncated one");
    w = $urandom; line_word(w, 32); take(w, 0, "after truncated");
    // overrun
    line_word(32'h1234_5678, 32); line_word(32'h9abc_def0, 32);
    check(ovr, "overrun flagged");
    take(32'h9abc_def0, 0, "newest word kept");
    check(!ovr, "overrun cleared by ack");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
