// tb_regfile: self-checking test of the register file. Random writes and
// reads on both ports are compared with a model array; register 0 must read
// zero whatever is written to it; reads are combinational and see a write
// only after the clock edge; reset clears every register.
module tb_regfile;
  localparam int N = 32;
  logic        clk = 0, rst;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] model [N];
  int checks = 0, failures = 0, cycles = 0;

  regfile dut (.clk, .rst, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    #1;
    checks++;
    if (rd1 !== model[ra1] || rd2 !== model[ra2]) begin
      failures++;
      $display("FAIL ra1=%0d rd1=%h exp=%h ra2=%0d rd2=%h exp=%h", ra1, rd1, model[ra1], ra2, rd2, model[ra2]);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    rst = 1; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    @(posedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin ra1 = 5'(i); ra2 = 5'(N - 1 - i); check_reads(); end
    repeat (3000) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = ($urandom_range(0, 3) == 0) ? wa : 5'($urandom);
      ra2 = 5'($urandom);
      check_reads();   // old value visible before the edge
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
      check_reads();   // new value visible after the edge
    end
    // register 0 ignores writes
    @(negedge clk); we = 1; wa = 0; wd = 32'hFFFF_FFFF; ra1 = 0; ra2 = 0;
    @(posedge clk); #1; check_reads();
    // reset clears
    @(negedge clk); we = 0; rst = 1;
    @(posedge clk); @(negedge clk); rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < N; i++) begin ra1 = 5'(i); ra2 = 5'(i); check_reads(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
