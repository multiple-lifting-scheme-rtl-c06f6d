// tb_temporal_buffer: writes random words to every address of a 16-deep
// buffer, reads them back in a shuffled order, and checks the one-cycle read
// latency, that read data holds while the port is idle or writing, and that
// an access with en low changes nothing.
module tb_temporal_buffer;
  localparam int DEPTH = 16;
  localparam int WIDTH = 64;

  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [3:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  temporal_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  task automatic check(input logic [WIDTH-1:0] want, input string what);
    checks++;
    if (rdata !== want) begin
      failures++;
      $display("FAIL: %s: rdata %h expected %h", what, rdata, want);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] last;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      en = 1'b1; we = 1'b1; addr = 4'(i);
      wdata = {$urandom, $urandom};
      model[i] = wdata;
      @(negedge clk);
    end
    // an access with en low must not write
    en = 1'b0; we = 1'b1; addr = 4'd3; wdata = ~model[3];
    @(negedge clk);
    for (int n = 0; n < 4 * DEPTH; n++) begin
      int i;
      i = $urandom_range(0, DEPTH-1);
      en = 1'b1; we = 1'b0; addr = 4'(i);
      @(negedge clk);
      check(model[i], "read after one edge");
      last = model[i];
      // idle cycle: data holds
      en = 1'b0; addr = 4'(i ^ 1);
      @(negedge clk);
      check(last, "hold while idle");
      // write cycle: read data holds, memory updated
      en = 1'b1; we = 1'b1; addr = 4'(i ^ 2); wdata = {$urandom, $urandom};
      model[i ^ 2] = wdata;
      @(negedge clk);
      check(last, "hold during write");
      we = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
