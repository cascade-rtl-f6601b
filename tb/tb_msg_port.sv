// tb_msg_port: an external agent runs four-phase request and result cycles
// against the port while a simple controller model accepts requests (with
// random delays before it is ready) and offers results. Checks the data
// in both directions and the order of req/ack edges.
module tb_msg_port;
  logic clk = 0, rst = 1, req = 0, ack;
  logic [19:0] msg_in = '0, msg_out, rx_data, tx_data = '0;
  logic rx_ready = 0, rx_valid, tx_valid = 0, tx_done;
  int checks = 0, failures = 0;

  msg_port dut (.clk, .rst, .req, .ack, .msg_in, .msg_out, .rx_ready, .rx_valid, .rx_data,
                .tx_valid, .tx_data, .tx_done);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [19:0] got;
  int          nrx = 0;
  always @(posedge clk) if (rx_valid) begin got <= rx_data; nrx <= nrx + 1; end

  initial begin
    logic [19:0] v;
    int n;
    repeat (2) @(posedge clk); rst <= 0;
    for (int it = 0; it < 200; it++) begin
      v = 20'($urandom);
      if (it % 2 == 0) begin
        // request cycle: data first, then req
        @(negedge clk); msg_in = v; rx_ready = 0;
        @(negedge clk); req = 1;
        repeat ($urandom_range(0, 4)) @(negedge clk);
        check(ack == 0, "no ack before ready");
        n = nrx;
        rx_ready = 1;
        while (!ack) @(negedge clk);
        rx_ready = 0;
        @(negedge clk);
        check(nrx == n + 1 && got == v, "request data latched once");
      end else begin
        // result cycle
        @(negedge clk); tx_valid = 1; tx_data = v;
        @(negedge clk); req = 1;
        while (!ack) @(negedge clk);
        check(msg_out == v, "result data");
        check(tx_done == 1'b1, "tx_done");
        tx_valid = 0;
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(ack == 1, "ack held while req high");
      req = 0;
      @(negedge clk); @(negedge clk);
      check(ack == 0, "ack dropped after req");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
