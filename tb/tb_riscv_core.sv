// tb_riscv_core: end-to-end test of the single-cycle RV32I core at its full
// default size (64 KiB instruction memory, 16 KiB data memory).
//
// A program is assembled here with rv_asm_pkg and loaded through the program
// port while the core is held in reset. A reference instruction-set model
// written in this testbench then runs the same program in lockstep with the
// core: every cycle the core's PC, instruction, register write-back (enable,
// destination, value) and memory write enable must match the model's, which
// also checks that exactly one instruction completes per clock. At the end
// the whole register file is compared with the model.
//
// The program contains the add/sub/or/xor sequence seen in the design's
// reference waveform, every RV32I ALU, load, store, branch, jump and
// upper-immediate instruction, a counted loop, a call and return, a write to
// x0, an unsupported instruction (ecall) and a few hundred random ALU and
// memory instructions. Each mechanism is counted and one that never happens
// counts as a failure.
module tb_riscv_core;
  import rv_asm_pkg::*;

  localparam int unsigned N_RANDOM = 400;
  localparam logic [31:0] HALT     = 32'h0000_006F;  // jal x0, 0
  localparam logic [31:0] BASE     = 32'h0000_0100;  // data area used by the program

  logic        clk = 1'b0, rst = 1'b1;
  logic        prog_we = 1'b0;
  logic [31:0] prog_addr = '0, prog_data = '0;
  logic [31:0] pc, instr, write_data;
  logic [3:0]  alu_control;
  logic        zero, reg_write, mem_write, illegal;
  logic [4:0]  write_reg;

  riscv_core dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_data,
    .pc, .instr, .alu_control, .zero, .reg_write, .write_reg, .write_data, .mem_write, .illegal
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] prog [$];

  // ---------------------------------------------------------------- counters
  typedef enum int {
    M_ADD, M_SUB, M_SLL, M_SLT, M_SLTU, M_XOR, M_SRL, M_SRA, M_OR, M_AND,
    M_ADDI, M_SLTI, M_SLTIU, M_XORI, M_ORI, M_ANDI, M_SLLI, M_SRLI, M_SRAI,
    M_LB, M_LH, M_LW, M_LBU, M_LHU, M_SB, M_SH, M_SW,
    M_BEQ_T, M_BEQ_N, M_BNE_T, M_BNE_N, M_BLT_T, M_BLT_N, M_BGE_T, M_BGE_N,
    M_BLTU_T, M_BLTU_N, M_BGEU_T, M_BGEU_N,
    M_JAL, M_JALR, M_LUI, M_AUIPC, M_X0_WRITE, M_UNSUPPORTED, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  // ------------------------------------------------------- reference model
  logic [31:0] x [32];
  logic [31:0] mpc;
  logic [7:0]  dm [int unsigned];

  function automatic logic [7:0] rd8(input logic [31:0] a);
    return dm.exists(a) ? dm[a] : 8'h00;
  endfunction

  // Executes the instruction at mpc; returns what it writes back.
  task automatic iss_step(output logic wr, output logic [4:0] wrd, output logic [31:0] wval, output logic mw);
    logic [31:0] in, a, b, immi, imms, immb, immu, immj, npc, ea, v;
    logic [4:0]  rd;
    logic [2:0]  f3;
    logic        alt, taken;
    int          bidx;
    in   = prog[mpc >> 2];
    rd   = in[11:7];
    f3   = in[14:12];
    alt  = in[30];
    a    = x[in[19:15]];
    b    = x[in[24:20]];
    immi = {{20{in[31]}}, in[31:20]};
    imms = {{20{in[31]}}, in[31:25], in[11:7]};
    immb = {{19{in[31]}}, in[31], in[7], in[30:25], in[11:8], 1'b0};
    immu = {in[31:12], 12'b0};
    immj = {{11{in[31]}}, in[31], in[19:12], in[20], in[30:21], 1'b0};
    npc  = mpc + 4;
    wr = 1'b0; wrd = rd; wval = '0; mw = 1'b0; v = '0;
    case (in[6:0])
      7'b0110011, 7'b0010011: begin
        logic is_reg;
        logic [31:0] o;
        is_reg = (in[6:0] == 7'b0110011);
        o = is_reg ? b : immi;
        case (f3)
          3'd0: v = (is_reg && alt) ? a - o : a + o;
          3'd1: v = a << o[4:0];
          3'd2: v = ($signed(a) < $signed(o)) ? 1 : 0;
          3'd3: v = (a < o) ? 1 : 0;
          3'd4: v = a ^ o;
          3'd5: v = alt ? $unsigned($signed(a) >>> o[4:0]) : a >> o[4:0];
          3'd6: v = a | o;
          default: v = a & o;
        endcase
        if (is_reg) mech[M_ADD + ((f3 == 0) ? (alt ? 1 : 0) : (f3 == 1) ? 2 : (f3 == 2) ? 3 : (f3 == 3) ? 4 :
                               (f3 == 4) ? 5 : (f3 == 5) ? (alt ? 7 : 6) : (f3 == 6) ? 8 : 9)]++;
        else mech[M_ADDI + ((f3 == 0) ? 0 : (f3 == 2) ? 1 : (f3 == 3) ? 2 : (f3 == 4) ? 3 : (f3 == 6) ? 4 :
                            (f3 == 7) ? 5 : (f3 == 1) ? 6 : (alt ? 8 : 7))]++;
        wr = 1'b1;
      end
      7'b0000011: begin
        ea = a + immi;
        case (f3)
          3'd0: begin v = {{24{rd8(ea)[7]}}, rd8(ea)};                 mech[M_LB]++;  end
          3'd1: begin v = {{16{rd8(ea+1)[7]}}, rd8(ea+1), rd8(ea)};    mech[M_LH]++;  end
          3'd4: begin v = {24'b0, rd8(ea)};                            mech[M_LBU]++; end
          3'd5: begin v = {16'b0, rd8(ea+1), rd8(ea)};                 mech[M_LHU]++; end
          default: begin v = {rd8(ea+3), rd8(ea+2), rd8(ea+1), rd8(ea)}; mech[M_LW]++; end
        endcase
        wr = 1'b1;
      end
      7'b0100011: begin
        ea = a + imms;
        mw = 1'b1;
        dm[ea] = b[7:0];
        if (f3 != 0) dm[ea+1] = b[15:8];
        if (f3 == 2) begin dm[ea+2] = b[23:16]; dm[ea+3] = b[31:24]; end
        mech[(f3 == 0) ? M_SB : (f3 == 1) ? M_SH : M_SW]++;
      end
      7'b1100011: begin
        case (f3)
          3'd0: begin taken = (a == b);                   bidx = M_BEQ_T;  end
          3'd1: begin taken = (a != b);                   bidx = M_BNE_T;  end
          3'd4: begin taken = ($signed(a) < $signed(b));  bidx = M_BLT_T;  end
          3'd5: begin taken = ($signed(a) >= $signed(b)); bidx = M_BGE_T;  end
          3'd6: begin taken = (a < b);                    bidx = M_BLTU_T; end
          default: begin taken = (a >= b);                bidx = M_BGEU_T; end
        endcase
        mech[bidx + (taken ? 0 : 1)]++;
        if (taken) npc = mpc + immb;
      end
      7'b1101111: begin v = mpc + 4; wr = 1'b1; npc = mpc + immj; mech[M_JAL]++; end
      7'b1100111: begin v = mpc + 4; wr = 1'b1; npc = (a + immi) & ~32'd1; mech[M_JALR]++; end
      7'b0110111: begin v = immu; wr = 1'b1; mech[M_LUI]++; end
      7'b0010111: begin v = mpc + immu; wr = 1'b1; mech[M_AUIPC]++; end
      default: mech[M_UNSUPPORTED]++;
    endcase
    wval = v;
    if (wr && rd == 0) mech[M_X0_WRITE]++;
    if (wr && rd != 0) x[rd] = v;
    mpc = npc;
  endtask

  // --------------------------------------------------------------- program
  function automatic logic [12:0] boff(input int from, input int to);
    return 13'((to - from) * 4);
  endfunction

  task automatic emit(input logic [31:0] w);
    prog.push_back(w);
  endtask

  // Conditional branch over one instruction: taken skips the addi.
  task automatic branch_pair(input logic [2:0] f3, input logic [4:0] r1, input logic [4:0] r2);
    emit(b_type(13'd8, r2, r1, f3));
    emit(addi(5'd13, 5'd13, 12'd1));
  endtask

  task automatic build_program();
    int loop, call_at, sub_at;
    // Constants.
    emit(addi(5'd1, 5'd0, 12'd5));
    emit(addi(5'd2, 5'd0, 12'hFFD));           // -3
    emit(lui (5'd3, 20'h80000));
    emit(addi(5'd3, 5'd3, 12'd1));             // 0x8000_0001
    emit(auipc(5'd4, 20'h00001));
    emit(lui (5'd5, 20'h12345));
    emit(addi(5'd5, 5'd5, 12'h678));
    emit(addi(5'd10, 5'd0, 12'(BASE)));
    // Clear the data area: 64 words from BASE.
    emit(addi(5'd15, 5'd10, 12'd0));
    emit(addi(5'd16, 5'd0, 12'd64));
    loop = prog.size();
    emit(s_type(12'd0, 5'd0, 5'd15, 3'd2));
    emit(addi(5'd15, 5'd15, 12'd4));
    emit(addi(5'd16, 5'd16, 12'hFFF));
    emit(b_type(boff(prog.size(), loop), 5'd0, 5'd16, 3'd1));   // bne x16, x0, loop
    // The add/sub/or/xor sequence of the reference waveform.
    emit(addi(5'd8,  5'd0, 12'h018)); emit(addi(5'd9,  5'd0, 12'h019));
    emit(addi(5'd18, 5'd0, 12'h020)); emit(addi(5'd19, 5'd0, 12'h021));
    emit(addi(5'd20, 5'd0, 12'h022)); emit(addi(5'd21, 5'd0, 12'h023));
    emit(addi(5'd22, 5'd0, 12'h024)); emit(addi(5'd23, 5'd0, 12'h025));
    emit(32'h0094_0333);   // add x6, x8, x9
    emit(32'h4139_03B3);   // sub x7, x18, x19
    emit(32'h015A_62B3);   // or  x5, x20, x21
    emit(32'h017B_4E33);   // xor x28, x22, x23
    emit(lui (5'd5, 20'h12345));
    emit(addi(5'd5, 5'd5, 12'h678));
    // Every register-register and register-immediate operation.
    emit(add (5'd20, 5'd1, 5'd2));  emit(sub (5'd21, 5'd2, 5'd1));
    emit(sll (5'd22, 5'd5, 5'd1));  emit(slt (5'd23, 5'd2, 5'd1));
    emit(sltu(5'd24, 5'd2, 5'd1));  emit(xor_(5'd25, 5'd5, 5'd3));
    emit(srl (5'd26, 5'd3, 5'd1));  emit(sra (5'd27, 5'd3, 5'd1));
    emit(or_ (5'd28, 5'd5, 5'd2));  emit(and_(5'd29, 5'd5, 5'd2));
    emit(i_type(12'hF00, 5'd5, 3'd2, 5'd20, 7'b0010011));   // slti
    emit(i_type(12'hF00, 5'd5, 3'd3, 5'd21, 7'b0010011));   // sltiu
    emit(i_type(12'h0FF, 5'd5, 3'd4, 5'd22, 7'b0010011));   // xori
    emit(i_type(12'h800, 5'd1, 3'd6, 5'd23, 7'b0010011));   // ori
    emit(i_type(12'h7F0, 5'd5, 3'd7, 5'd24, 7'b0010011));   // andi
    emit(i_type(12'h004, 5'd5, 3'd1, 5'd25, 7'b0010011));   // slli
    emit(i_type(12'h01F, 5'd3, 3'd5, 5'd26, 7'b0010011));   // srli
    emit(i_type(12'h41F, 5'd3, 3'd5, 5'd27, 7'b0010011));   // srai
    // Stores and loads of every size.
    emit(s_type(12'd0,  5'd5, 5'd10, 3'd2));   // sw
    emit(s_type(12'd6,  5'd2, 5'd10, 3'd1));   // sh
    emit(s_type(12'd9,  5'd3, 5'd10, 3'd0));   // sb
    emit(s_type(12'd11, 5'd2, 5'd10, 3'd0));   // sb
    emit(load(3'd2, 5'd11, 5'd10, 12'd0));     // lw
    emit(load(3'd1, 5'd12, 5'd10, 12'd6));     // lh
    emit(load(3'd5, 5'd14, 5'd10, 12'd6));     // lhu
    emit(load(3'd0, 5'd17, 5'd10, 12'd11));    // lb
    emit(load(3'd4, 5'd19, 5'd10, 12'd11));    // lbu
    emit(load(3'd2, 5'd30, 5'd10, 12'd8));     // lw
    // Branches, each taken and not taken.
    branch_pair(3'd0, 5'd1, 5'd1);  branch_pair(3'd0, 5'd1, 5'd2);   // beq
    branch_pair(3'd1, 5'd1, 5'd2);  branch_pair(3'd1, 5'd1, 5'd1);   // bne
    branch_pair(3'd4, 5'd2, 5'd1);  branch_pair(3'd4, 5'd1, 5'd2);   // blt
    branch_pair(3'd5, 5'd1, 5'd2);  branch_pair(3'd5, 5'd2, 5'd1);   // bge
    branch_pair(3'd6, 5'd1, 5'd2);  branch_pair(3'd6, 5'd2, 5'd1);   // bltu
    branch_pair(3'd7, 5'd2, 5'd1);  branch_pair(3'd7, 5'd1, 5'd2);   // bgeu
    // Call and return, a write to x0 and an unsupported instruction.
    call_at = prog.size();
    emit(32'h0);                                // patched: jal x1, sub
    emit(addi(5'd0, 5'd1, 12'd7));              // write to x0
    emit(32'h0000_0073);                        // ecall: executes as a no-op
    // Random ALU and memory instructions.
    for (int i = 0; i < N_RANDOM; i++) begin
      logic [4:0] rd, r1, r2;
      logic [2:0] f3;
      logic       alt;
      int unsigned k;
      rd = 5'($urandom_range(1, 31));
      if (rd == 5'd10) rd = 5'd9;
      r1 = 5'($urandom);
      r2 = 5'($urandom);
      k  = $urandom % 10;
      f3 = 3'($urandom);
      alt = (f3 == 3'd0 || f3 == 3'd5) ? 1'($urandom) : 1'b0;
      if (k < 4)
        emit(r_type({1'b0, alt, 5'b0}, r2, r1, f3, rd, 7'b0110011));
      else if (k < 7) begin
        logic [11:0] im;
        im = 12'($urandom);
        if (f3 == 3'd1 || f3 == 3'd5) im[11:5] = {1'b0, alt && f3 == 3'd5, 5'b0};
        emit(i_type(im, r1, f3, rd, 7'b0010011));
      end
      else if (k < 8)
        emit(s_type(12'($urandom % 64 * 4), r2, 5'd10, 3'($urandom % 3)));
      else begin
        logic [2:0] lf [5];
        lf = '{3'd0, 3'd1, 3'd2, 3'd4, 3'd5};
        emit(load(lf[$urandom % 5], rd, 5'd10, 12'($urandom % 64 * 4)));
      end
    end
    emit(HALT);
    sub_at = prog.size();
    emit(addi(5'd31, 5'd31, 12'd7));
    emit(jalr(5'd0, 5'd1, 12'd0));
    prog[call_at] = j_type(21'((sub_at - call_at) * 4), 5'd1);
  endtask

  // ------------------------------------------------------------------ test
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, retired;
    logic        e_wr, e_mw;
    logic [4:0]  e_rd;
    logic [31:0] e_val;
    static logic saw_sub_minus1 = 1'b0;

    build_program();
    // Load the program while in reset.
    foreach (prog[i]) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 32'(i * 4); prog_data = prog[i];
    end
    @(negedge clk) prog_we = 1'b0;
    @(negedge clk) rst = 1'b0;
    foreach (x[i]) x[i] = '0;
    mpc = '0;
    cycles = 0; retired = 0;

    while (prog[mpc >> 2] != HALT) begin
      // Compare the combinational outputs of this cycle with the model.
      #1;
      checks++;
      if (pc !== mpc) begin
        failures++;
        if (failures < 20) $display("FAIL pc=%h exp %h", pc, mpc);
      end
      iss_step(e_wr, e_rd, e_val, e_mw);
      if (instr == 32'h4139_03B3 && alu_control == 4'd4 && write_reg == 5'd7 && write_data == 32'hFFFF_FFFF)
        saw_sub_minus1 = 1'b1;
      retired++;
      checks++;
      if (instr !== prog[pc >> 2] || reg_write !== e_wr || mem_write !== e_mw ||
          (e_wr && (write_reg !== e_rd || write_data !== e_val))) begin
        failures++;
        if (failures < 20)
          $display("FAIL pc=%h instr=%h we=%b rd=%0d wd=%h mw=%b | exp we=%b rd=%0d wd=%h mw=%b",
                   pc, instr, reg_write, write_reg, write_data, mem_write, e_wr, e_rd, e_val, e_mw);
      end
      @(posedge clk);
      cycles++;
      #1;
      checks++;
      if (pc !== mpc) begin
        failures++;
        if (failures < 20) $display("FAIL next pc=%h exp %h", pc, mpc);
      end
      @(negedge clk);
    end

    // One instruction per clock.
    checks++;
    if (cycles != retired) begin
      failures++;
      $display("FAIL %0d instructions took %0d cycles", retired, cycles);
    end
    // Final register file.
    for (int r = 0; r < 32; r++) begin
      checks++;
      if (dut.u_rf.regs[r] !== x[r] && r != 0) begin
        failures++;
        $display("FAIL x%0d=%h exp %h", r, dut.u_rf.regs[r], x[r]);
      end
    end
    // The reference waveform's sub x7, x18, x19 (0x20 - 0x21) must have given -1.
    checks++;
    if (!saw_sub_minus1) begin
      failures++;
      $display("FAIL sub x7, x18, x19 did not write FFFFFFFF");
    end
    // Every mechanism must have happened.
    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      if (mech[m] == 0) begin
        mech_e me;
        me = mech_e'(m);
        failures++;
        $display("FAIL mechanism %s never happened", me.name());
      end
    end
    $display("retired %0d instructions in %0d cycles", retired, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
