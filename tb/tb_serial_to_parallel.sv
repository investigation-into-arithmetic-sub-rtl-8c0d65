// tb_serial_to_parallel: self-check of the serial operand loader.
//
// Sends random 16-bit words least significant bit first, one bit per
// clock, with advance raised together with the last bit. Checks that
//   - parallel_out is 0 after reset;
//   - the word appears on parallel_out right after the clock edge that
//     samples advance = 1 with the last bit, and not before;
//   - parallel_out holds while the next word is shifted in;
//   - back-to-back words with advance on every 16th edge all arrive, so
//     one word takes 16 clocks;
//   - a word sent with an idle gap before its advance still loads the
//     last 16 bits sent.
module tb_serial_to_parallel;
  localparam int WIDTH = 16;
  logic clk = 1'b0, rst_n, serial_in, advance;
  logic [WIDTH-1:0] parallel_out;
  int checks = 0, failures = 0;

  serial_to_parallel #(.WIDTH(WIDTH)) dut (
    .clk(clk), .rst_n(rst_n), .serial_in(serial_in), .advance(advance),
    .parallel_out(parallel_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send the first WIDTH-1 bits of a word with advance low, checking that
  // the held value does not move. The caller then sends the last bit with
  // advance high.
  task automatic send(input logic [WIDTH-1:0] w, input logic [WIDTH-1:0] held);
    for (int k = 0; k < WIDTH - 1; k++) begin
      serial_in <= w[k];
      advance   <= 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (parallel_out !== held) begin
        failures++;
        $display("FAIL held value changed while shifting: %h, expected %h", parallel_out, held);
      end
    end
  endtask

  initial begin
    logic [WIDTH-1:0] w, prev;
    rst_n = 1'b0; serial_in = 1'b0; advance = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (parallel_out !== '0) begin
      failures++;
      $display("FAIL not cleared by reset");
    end
    rst_n = 1'b1;
    prev = '0;
    for (int t = 0; t < 100; t++) begin
      w = (t == 0) ? 16'h8001 : WIDTH'($urandom);
      send(w, prev);
      if (t % 10 == 9) begin
        // idle gap: extra filler clocks would be pushed out again, so here
        // the gap comes first and the whole word is resent afterwards
        serial_in <= 1'b1;
        repeat (3) @(posedge clk);
        send(w, prev);
      end
      advance <= 1'b1;
      serial_in <= w[WIDTH-1];
      @(posedge clk);
      #1;
      checks++;
      if (parallel_out !== w) begin
        failures++;
        $display("FAIL word %0d: got %h, expected %h", t, parallel_out, w);
      end
      advance <= 1'b0;
      prev = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
