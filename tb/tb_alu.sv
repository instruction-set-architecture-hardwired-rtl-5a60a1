// tb_alu: self-checking test of the ALU. Every operation is applied to
// directed corner operands and to random operands; results and the zero
// test are compared with expressions computed here.
module tb_alu;
  import mips_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        az;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y, .a_is_zero(az));

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] w);
    case (o)
      ALU_ADD:  return x + w;
      ALU_SUB:  return x - w;
      ALU_AND:  return x & w;
      ALU_OR:   return x | w;
      ALU_XOR:  return x ^ w;
      ALU_NOR:  return ~(x | w);
      ALU_SLT:  return (x[31] != w[31]) ? {31'd0, x[31]} : {31'd0, x < w};
      ALU_SLTU: return {31'd0, x < w};
      ALU_SLL:  return w << x[4:0];
      ALU_SRL:  return w >> x[4:0];
      ALU_SRA:  begin
                  logic [63:0] ext = {{32{w[31]}}, w};
                  return 32'(ext >> x[4:0]);
                end
      ALU_LUI:  return {w[15:0], 16'h0};
      ALU_ZERO: return {31'd0, x == 0};
      default:  return 32'h0;
    endcase
  endfunction

  task automatic try(alu_op_e o, logic [31:0] x, logic [31:0] w);
    op = o; a = x; b = w;
    #1;
    checks++;
    if (y !== model(o, x, w) || az !== (x == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h az=%b", o.name(), x, w, y, model(o, x, w), az);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_001F};

  initial begin
    for (int o = 0; o <= int'(ALU_ZERO); o++) begin
      foreach (CORNER[i]) foreach (CORNER[j]) try(alu_op_e'(o), CORNER[i], CORNER[j]);
      repeat (200) try(alu_op_e'(o), $urandom, $urandom);
    end
    // a few hand-computed values
    try(ALU_SRA, 32'd4, 32'hF000_0000);   // -> FF00_0000
    checks++; if (y !== 32'hFF00_0000) failures++;
    try(ALU_SLT, 32'hFFFF_FFFF, 32'd1);   // -1 < 1
    checks++; if (y !== 32'd1) failures++;
    try(ALU_SLTU, 32'hFFFF_FFFF, 32'd1);
    checks++; if (y !== 32'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
