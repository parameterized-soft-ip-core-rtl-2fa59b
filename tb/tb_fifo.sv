// Testbench for fifo: random pushes and pops against a queue model. Checks the
// head data, empty/full/count flags, that a push when full and a pop when empty
// are ignored, and that clr empties the FIFO.
module tb_fifo;
  localparam int W = 18, D = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic clr = 0, wr_en = 0, rd_en = 0, empty, full;
  logic [W-1:0] wr_data = 0, rd_data;
  logic [4:0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_full = 0, n_empty_rd = 0;

  fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk(clk), .rst(rst), .clr(clr), .wr_en(wr_en), .wr_data(wr_data),
    .rd_en(rd_en), .rd_data(rd_data), .empty(empty), .full(full), .count(count));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      bias = (n / 300) % 2 ? 75 : 25;   // alternate filling and draining phases
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      check(count == 5'(q.size()), "count");
      if (q.size() > 0) check(rd_data == q[0], "head data");
      wr_en = ($urandom_range(0, 99) < bias); rd_en = ($urandom_range(0, 99) >= bias);
      wr_data = W'($urandom);
      @(posedge clk);
      begin
        int sz;
        sz = q.size();
        if (rd_en) begin if (sz > 0) void'(q.pop_front()); else n_empty_rd++; end
        if (wr_en) begin if (sz < D) q.push_back(wr_data); else n_full++; end
      end
    end
    check(n_full > 0 && n_empty_rd > 0, "full and empty cases exercised");
    @(negedge clk); wr_en = 1; rd_en = 0; @(negedge clk); clr = 1; wr_en = 0; @(negedge clk); clr = 0;
    check(empty && count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
