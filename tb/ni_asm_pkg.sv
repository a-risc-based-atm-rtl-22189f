// ni_asm_pkg: assembler for the NI RISC cores, used by the test benches.
//
// A program is written as a sequence of method calls (add, addi, lw, beq,
// lcam_start, ...) and is assembled twice: the first pass records label
// addresses, the second emits 32-bit words with the labels resolved. The
// assembler plays the part of the compiler in setting the F (forwarding)
// bit: an ALU or branch instruction gets F = 1 when one of its sources is
// the destination of the instruction just before it, or when it follows a
// label (its predecessor is then unknown). Loads, stores and CAM
// instructions have no F bit; a source written by the instruction just
// before them is counted in `hazards`, which test benches require to be 0.
// The instruction after a branch is its delay slot and always executes.
package ni_asm_pkg;

  import atm_ni_pkg::*;

  class ni_asm;
    logic [31:0] code[$];
    int          labels[string];
    bit          pass2;
    int          prev_dest;   // -1: unknown (after a label), 0: none
    int          hazards;

    function new();
      pass2     = 0;
      prev_dest = 0;
      hazards   = 0;
    endfunction

    function void start_pass(bit second);
      pass2     = second;
      code.delete();
      prev_dest = 0;
      hazards   = 0;
    endfunction

    function void label(string name);
      if (!pass2) labels[name] = code.size();
      prev_dest = -1;
    endfunction

    function logic [11:0] at(string name);
      if (!pass2) return 12'd0;
      if (!labels.exists(name)) begin
        $display("ASM: unknown label %s", name);
        hazards++;
        return 12'd0;
      end
      return 12'(labels[name]);
    endfunction

    function bit need_f(int a, int b);
      if (prev_dest == -1) return 1'b1;
      return prev_dest != 0 && (a == prev_dest || b == prev_dest);
    endfunction

    function void check_nof(int a, int b);
      if (prev_dest > 0 && (a == prev_dest || b == prev_dest)) begin
        if (pass2) $display("ASM: unforwardable hazard at %0d on r%0d", code.size(), prev_dest);
        hazards++;
      end
    endfunction

    function void emit(logic [31:0] w, int dest);
      code.push_back(w);
      prev_dest = dest;
    endfunction

    // ---------------- ALU ----------------
    function void add(int d, int a, int b);   // d = a + b
      emit({OP_ADD, need_f(a, b), 5'(d), 5'(b), 5'(a), 11'd0}, d);
    endfunction
    function void sub(int d, int a, int b);   // d = a - b
      emit({OP_SUB, need_f(a, b), 5'(d), 5'(b), 5'(a), 11'd0}, d);
    endfunction
    function void addi(int d, int a, int imm);
      emit({OP_ADDI, need_f(a, -2), 5'(d), 5'(a), 16'(imm)}, d);
    endfunction
    function void andi(int d, int a, int imm);
      emit({OP_AND, need_f(a, -2), 5'(d), 5'(a), 16'(imm)}, d);
    endfunction
    function void nop();
      emit({OP_ADD, 1'b0, 5'd0, 5'd0, 5'd0, 11'd0}, 0);
    endfunction
    // ------------- branches --------------
    function void br(opcode_e op, int a, int b, string l);
      emit({op, need_f(a, b), 5'(a), 5'(b), 3'd0, 1'b0, at(l)}, 0);
    endfunction
    function void bri(opcode_e op, int a, int imm, string l);
      emit({op, need_f(a, -2), 5'(a), 8'(imm), 1'b1, at(l)}, 0);
    endfunction
    function void beq (int a, int b, string l);   br (OP_BEQ, a, b, l);   endfunction
    function void bge (int a, int b, string l);   br (OP_BGE, a, b, l);   endfunction
    function void ble (int a, int b, string l);   br (OP_BLE, a, b, l);   endfunction
    function void beqi(int a, int i, string l);   bri(OP_BEQ, a, i, l);   endfunction
    function void bgei(int a, int i, string l);   bri(OP_BGE, a, i, l);   endfunction
    function void blei(int a, int i, string l);   bri(OP_BLE, a, i, l);   endfunction
    function void jmp(string l);                  br (OP_BEQ, 0, 0, l);   endfunction
    // -------------- memory ---------------
    function void lw(int rt, int off, int base);
      check_nof(base, -2);
      emit({OP_LOAD, 1'b0, 5'(rt), 5'(base), 16'(off)}, rt);
    endfunction
    function void sw(int rt, int off, int base);
      check_nof(base, rt);
      emit({OP_STORE, 1'b0, 5'(rt), 5'(base), 16'(off)}, 0);
    endfunction
    // ---------------- CAM ----------------
    function void lcam_start(int d, int key);
      check_nof(key, -2);
      emit({OP_LCAM, 1'b1, 5'(d), 5'(key), 16'd0}, d);
    endfunction
    function void lcam_end(int d, int key);
      check_nof(key, -2);
      emit({OP_LCAM, 1'b0, 5'(d), 5'(key), 16'd0}, d);
    endfunction
    function void cam_insert(int key);
      check_nof(key, -2);
      emit({OP_STCAM, 1'b1, 5'(key), 5'd0, 1'b0, 15'd0}, 0);
    endfunction
    function void cam_wr_start(int key, int data);
      check_nof(key, data);
      emit({OP_STCAM, 1'b0, 5'(key), 5'(data), 1'b1, 15'd0}, 0);
    endfunction
    function void cam_wr_end(int key, int data);
      check_nof(key, data);
      emit({OP_STCAM, 1'b0, 5'(key), 5'(data), 1'b0, 15'd0}, 0);
    endfunction
    // load a constant (built with addi and doublings)
    function void li(int d, int value);
      int sh = 0;
      int v  = value;
      while (v > 32767) begin v = v >> 1; sh++; end
      addi(d, 0, v);
      repeat (sh) add(d, d, d);
      if ((v << sh) != value) addi(d, d, value - (v << sh));
    endfunction
  endclass

endpackage
