// tb_decoder: checks the ID-stage decoder in two ways.
//  1. Directed: one instruction of every kind, plus illegal encodings, with
//     the expected register reads, register write, immediate, class flags
//     and decode-stage exception written out by hand.
//  2. Random: 20000 words, biased towards the opcodes and function codes
//     the design knows, are decoded by a reference function written here
//     from the instruction table (opcode -> fields, in a different style to
//     the RTL) and every field of the control bundle is compared.
// The decoder is combinational; each word is applied and checked after #1.
module tb_decoder;
  import pipe5_pkg::*;
  word_t ir;
  ctrl_t c;
  int checks = 0, failures = 0;

  decoder dut (.ir(ir), .ctrl(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: re1 re2 we ws | class string | exc code (-1 none)
  task automatic t(input word_t w, input bit re1, input bit re2, input bit we, input int ws,
                   input string cls, input int exc, input bit has_imm = 1'b0,
                   input word_t imm = '0);
    string got;
    bit ok;
    ir = w;
    #1;
    got = "";
    if (c.load)  got = {got, "L"};
    if (c.store) got = {got, "S"};
    if (c.beqz)  got = {got, "BZ"};
    if (c.bnez)  got = {got, "BN"};
    if (c.jabs)  got = {got, "J"};
    if (c.rind)  got = {got, "R"};
    if (c.link)  got = {got, "K"};
    if (c.mfc0)  got = {got, "MF"};
    if (c.mtc0)  got = {got, "MT"};
    if (c.rfe)   got = {got, "E"};
    if (c.priv)  got = {got, "P"};
    if (c.trap_ovf) got = {got, "V"};
    ok = (c.re1 == re1) && (c.re2 == re2) && (c.we == we) && (!we || c.ws == 5'(ws)) &&
         (got == cls) && (exc < 0 ? !c.exc.valid : (c.exc.valid && c.exc.code == exc_code_t'(exc)));
    if (has_imm) ok = ok && (c.imm == imm);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %h: re %b%b we %b ws %0d cls %s exc %b/%0d imm %h", w, c.re1, c.re2, c.we, c.ws,
               got, c.exc.valid, c.exc.code, c.imm);
    end
  endtask


  // reference decode, field by field from the instruction table
  function automatic ctrl_t ref_decode(input word_t w);
    ctrl_t r;
    logic [5:0] op = w[31:26], f = w[5:0];
    reg_idx_t rs = w[25:21], rt = w[20:16], rd = w[15:11];
    word_t se = word_t'(signed'(w[15:0]));
    word_t ze = word_t'(w[15:0]);
    bit rtype_alu = (op == 6'h00) && (f inside {6'h20, 6'h22, 6'h24, 6'h25, 6'h26, 6'h2A});
    bit itype_alu = op inside {6'h08, 6'h0A, 6'h0C, 6'h0D, 6'h0E};
    r = '0;
    r.alu_op = ALU_ADD;
    if (rtype_alu) begin
      r.re1 = 1; r.re2 = 1; r.we = 1; r.ws = rd;
      r.alu_op = (f == 6'h20) ? ALU_ADD : (f == 6'h22) ? ALU_SUB : (f == 6'h24) ? ALU_AND :
                 (f == 6'h25) ? ALU_OR : (f == 6'h26) ? ALU_XOR : ALU_SLT;
      r.trap_ovf = (f == 6'h20) || (f == 6'h22);
    end else if (op == 6'h00 && (f == 6'h08 || f == 6'h09)) begin
      r.re1 = 1; r.rind = 1;
      if (f == 6'h09) begin r.link = 1; r.we = 1; r.ws = rd; end
    end else if (op == 6'h00 && f == 6'h0C) begin
      r.exc = '{1'b1, EXC_SYS};
    end else if (op == 6'h00 && w == 32'h0) begin
      // the no-op: nothing set
    end else if (op == 6'h02 || op == 6'h03) begin
      r.jabs = 1;
      if (op == 6'h03) begin r.link = 1; r.we = 1; r.ws = 5'd31; end
    end else if (op == 6'h04 || op == 6'h05) begin
      r.re1 = 1; r.imm = se; r.beqz = (op == 6'h04); r.bnez = (op == 6'h05);
    end else if (itype_alu) begin
      r.re1 = 1; r.we = 1; r.ws = rt; r.b_imm = 1;
      r.imm = (op == 6'h08 || op == 6'h0A) ? se : ze;
      r.alu_op = (op == 6'h08) ? ALU_ADD : (op == 6'h0A) ? ALU_SLT : (op == 6'h0C) ? ALU_AND :
                 (op == 6'h0D) ? ALU_OR : ALU_XOR;
      r.trap_ovf = (op == 6'h08);
    end else if (op == 6'h0F) begin
      r.we = 1; r.ws = rt; r.b_imm = 1; r.alu_op = ALU_PASSB; r.imm = {w[15:0], 16'h0};
    end else if (op == 6'h23 || op == 6'h2B) begin
      r.re1 = 1; r.b_imm = 1; r.imm = se;
      if (op == 6'h23) begin r.load = 1; r.we = 1; r.ws = rt; end
      else begin r.store = 1; r.re2 = 1; end
    end else if (op == 6'h10 && (rs == 5'h00 || rs == 5'h04 || (rs == 5'h10 && f == 6'h10))) begin
      r.priv = 1; r.imm = word_t'(rd);
      if (rs == 5'h00) begin r.mfc0 = 1; r.we = 1; r.ws = rt; end
      else if (rs == 5'h04) begin r.mtc0 = 1; r.re2 = 1; end
      else r.rfe = 1;
    end else begin
      r.exc = '{1'b1, EXC_RI};
      if (op == 6'h10) r.imm = word_t'(rd);
    end
    if (r.ws == 5'd0) r.we = 0;
    return r;
  endfunction

  task automatic rand_check(input int n);
    logic [5:0] ops [16] = '{6'h00, 6'h00, 6'h00, 6'h02, 6'h03, 6'h04, 6'h05, 6'h08,
                             6'h0A, 6'h0C, 6'h0D, 6'h0E, 6'h0F, 6'h23, 6'h2B, 6'h10};
    logic [5:0] fns [12] = '{6'h20, 6'h22, 6'h24, 6'h25, 6'h26, 6'h2A, 6'h08, 6'h09,
                             6'h0C, 6'h00, 6'h10, 6'h3F};
    ctrl_t e;
    for (int i = 0; i < n; i++) begin
      word_t w = $urandom;
      case ($urandom_range(0, 7))
        0: ;                                              // any word
        1: w[5:0] = fns[$urandom_range(0, 11)];
        2: begin w[31:26] = 6'h00; w[5:0] = fns[$urandom_range(0, 11)]; end
        3: begin w[31:26] = 6'h10; w[25:21] = ($urandom_range(0, 1) != 0) ? 5'h10 : 5'(4 * $urandom_range(0, 2)); w[5:0] = fns[$urandom_range(0, 11)]; end
        4: begin w[31:26] = 6'h00; w[5:0] = 6'h00; if ($urandom_range(0, 1) != 0) w[25:6] = '0; end
        default: w[31:26] = ops[$urandom_range(0, 15)];
      endcase
      if ($urandom_range(0, 7) == 0) w[20:11] = '0;        // r0 destinations
      ir = w;
      #1;
      e = ref_decode(w);
      checks++;
      if (c !== e) begin
        failures++;
        if (failures < 20) $display("FAIL random %h: got %h expected %h", w, c, e);
      end
    end
  endtask

  initial begin
    //            instruction                           re1 re2 we ws  class  exc
    t(32'h0000_0000,                                     0, 0, 0, 0,  "",     -1);  // nop
    t({6'h00, 5'd1, 5'd2, 5'd3, 5'd0, 6'h20},            1, 1, 1, 3,  "V",    -1);  // add
    t({6'h00, 5'd1, 5'd2, 5'd3, 5'd0, 6'h22},            1, 1, 1, 3,  "V",    -1);  // sub
    t({6'h00, 5'd1, 5'd2, 5'd4, 5'd0, 6'h26},            1, 1, 1, 4,  "",     -1);  // xor
    t({6'h00, 5'd1, 5'd2, 5'd0, 5'd0, 6'h26},            1, 1, 0, 0,  "",     -1);  // xor to r0
    t({6'h00, 5'd7, 5'd0, 5'd0, 5'd0, 6'h08},            1, 0, 0, 0,  "R",    -1);  // jr
    t({6'h00, 5'd7, 5'd0, 5'd9, 5'd0, 6'h09},            1, 0, 1, 9,  "RK",   -1);  // jalr
    t({6'h00, 20'd0, 6'h0C},                             0, 0, 0, 0,  "",      8);  // syscall
    t({6'h00, 5'd1, 5'd2, 5'd3, 5'd0, 6'h3F},            0, 0, 0, 0,  "",     10);  // bad funct
    t({6'h00, 5'd1, 5'd2, 5'd3, 5'd0, 6'h00},            0, 0, 0, 0,  "",     10);  // nonzero sll
    t({6'h02, 26'h40},                                   0, 0, 0, 0,  "J",    -1);  // j
    t({6'h03, 26'h40},                                   0, 0, 1, 31, "JK",   -1);  // jal
    t({6'h04, 5'd1, 5'd0, 16'hFFFE},                     1, 0, 0, 0,  "BZ",   -1, 1'b1, 32'hFFFF_FFFE); // beqz
    t({6'h05, 5'd1, 5'd0, 16'h0032},                     1, 0, 0, 0,  "BN",   -1, 1'b1, 32'h32);  // bnez
    t({6'h08, 5'd0, 5'd1, 16'h800A},                     1, 0, 1, 1,  "V",    -1, 1'b1, 32'hFFFF_800A); // addi
    t({6'h0D, 5'd2, 5'd5, 16'h800A},                     1, 0, 1, 5,  "",     -1, 1'b1, 32'h0000_800A); // ori
    t({6'h0F, 5'd0, 5'd6, 16'h1234},                     0, 0, 1, 6,  "",     -1, 1'b1, 32'h1234_0000); // lui
    t({6'h23, 5'd2, 5'd8, 16'hFFFC},                     1, 0, 1, 8,  "L",    -1, 1'b1, 32'hFFFF_FFFC); // lw
    t({6'h2B, 5'd2, 5'd8, 16'h0010},                     1, 1, 0, 0,  "S",    -1, 1'b1, 32'h10);  // sw
    t({6'h10, 5'h00, 5'd9, 5'd14, 11'd0},                0, 0, 1, 9,  "MFP",  -1, 1'b1, 32'd14);  // mfc0 epc
    t({6'h10, 5'h04, 5'd9, 5'd12, 11'd0},                0, 1, 0, 0,  "MTP",  -1, 1'b1, 32'd12);  // mtc0 status
    t({6'h10, 5'h10, 15'd0, 6'h10},                      0, 0, 0, 0,  "EP",   -1);  // rfe
    t({6'h10, 5'h10, 15'd0, 6'h01},                      0, 0, 0, 0,  "",     10);  // bad cop0
    t({6'h3F, 26'h123},                                  0, 0, 0, 0,  "",     10);  // bad opcode
    t({6'h23, 5'd2, 5'd0, 16'h0000},                     1, 0, 0, 0,  "L",    -1);  // lw to r0
    rand_check(20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
