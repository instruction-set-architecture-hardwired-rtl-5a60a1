// tb_ram_1r1w: self-checking test of the simple memory model. The memory is
// filled through the write port, then random reads and writes (to the same
// and to different words) are compared with a model: a read is
// combinational, a write lands at the rising edge and only when enabled.
module tb_ram_1r1w;
  localparam int W = 64;
  logic        clk = 0;
  logic [5:0]  raddr, waddr;
  logic [31:0] rdata, wdata;
  logic        we;
  logic [31:0] model [W];
  int checks = 0, failures = 0, cycles = 0;

  ram_1r1w #(.WORDS(W), .WIDTH(32)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read();
    #1;
    checks++;
    if (rdata !== model[raddr]) begin
      failures++;
      $display("FAIL raddr=%0d rdata=%h exp=%h", raddr, rdata, model[raddr]);
    end
  endtask

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = 32'(i) * 32'h0101_0101 + 32'h55;
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < W; i++) begin raddr = 6'(i); check_read(); end
    repeat (3000) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 6'($urandom); wdata = $urandom;
      raddr = $urandom_range(0, 1) ? waddr : 6'($urandom);
      check_read();   // before the edge: old contents
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      check_read();   // after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
