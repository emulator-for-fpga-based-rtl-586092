// tb_uart_rx: random bytes sent as 8N1 frames (16 clocks per bit) are received
// intact and one valid pulse each; a frame with a low stop bit gives frame_err
// and no byte; a short low glitch is not taken for a start bit.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 1, rxd = 1;
  logic [7:0] data;
  logic valid, ferr;
  int checks = 0, failures = 0, nvalid = 0, nerr = 0;
  logic [7:0] got [$];

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .data, .valid, .frame_err(ferr));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  always @(posedge clk) begin
    if (valid) begin nvalid++; got.push_back(data); end
    if (ferr) nerr++;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = stop; repeat (CPB) @(posedge clk);
    rxd = 1; repeat (CPB) @(posedge clk);
  endtask

  initial begin
    logic [7:0] sent [$];
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    repeat (5) @(posedge clk); #1;
    for (int i = 0; i < 50; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      sent.push_back(b);
      send(b, 1'b1);
    end
    send(8'h55, 1'b0);                 // framing error
    rxd = 0; repeat (3) @(posedge clk); rxd = 1;   // glitch
    repeat (4 * CPB) @(posedge clk);
    send(8'hC3, 1'b1);
    sent.push_back(8'hC3);
    repeat (4) @(posedge clk);
    checks++;
    if (nvalid != sent.size()) begin failures++; $display("FAIL %0d bytes, expected %0d", nvalid, sent.size()); end
    checks++;
    if (nerr != 1) begin failures++; $display("FAIL %0d framing errors", nerr); end
    foreach (sent[i]) begin
      checks++;
      if (i >= got.size() || got[i] != sent[i]) begin failures++; $display("FAIL byte %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
