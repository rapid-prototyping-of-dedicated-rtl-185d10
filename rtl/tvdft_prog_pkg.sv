// tvdft_prog_pkg: microprograms of the two-PE UCMs of the TVDFT processor.
//
// Each function returns the control-memory content of one UCM (see ucm_pkg
// for the control vector). The step lists are this design's mapping of the
// document's generator operations (load registers, bit-serial calculation,
// write back, output) and of its transform block onto the UCM; the
// register, RAM-word and clock assignments are this design's own.
//
// Generator (one output sample per 68 clocks; numbers are clocks after start):
//   init   0  R1.1<-IN1 (F0), R2.1<-IN2 (M)
//          1  RAM1[0]<-R1.1, RAM2[0]<-R2.1
//          2  R2.1<-IN2 (A0)
//          3  RAM2[1]<-R2.1
//   loop   L0 R1.1<-IN1 (dF), R1.2<-RAM1[0] (F), R2.1<-RAM2[1] (A)
//          L1 serial  R1.2 <- PE1 = R1.1 + R1.2          F = F + dF
//          L2 RAM1[0]<-R1.2, R2.2<-RAM2[0] (M)
//          L3 serial  R2.1 <- PE1 = R2.1 + R1.2          A = A + F
//          L4 RAM2[1]<-R2.1
//          L5 serial  R2.2 <- PE2 = R2.2 - R2.1          M - A
//          L6 serial  R2.2 <- PE2 = R2.1 * R2.2          y = A*(M-A)
//          L7 OUT_k<-R2.2, back to L0
//   y = A*(M-A) is the parabola the document uses for one half period of a
//   sine of amplitude M*M/4 when A counts samples within the half period.
// Transform (one sample per 68 clocks, in step with the generators):
//   init   0  serial  R1.1 <- PE1 = R1.1 - R1.1, R2.1 <- PE2 = R2.1 - R2.1 (zeros)
//          1  RAM1[0]<-R1.1, RAM2[0]<-R2.1        Re and Im accumulators cleared
//          2-5 four idle serial steps: the first generator sample is ready
//   loop   L0 R1.1<-IN1, R2.1<-IN2 with both input multiplexers on x(n)
//          L1 R1.2<-IN1 (cos), R2.2<-IN2 (sin)
//          L2 serial  R1.1 <- PE1 = R1.1*R1.2, R2.1 <- PE2 = R2.1*R2.2
//          L3 R1.2<-RAM1[0], R2.2<-RAM2[0]
//          L4 serial  R1.1 <- PE1 = R1.1+R1.2, R2.1 <- PE2 = R2.1+R2.2
//          L5 RAM1[0]<-R1.1, RAM2[0]<-R2.1, OUT_1<-R1.1 (Re), OUT_2<-R2.1 (Im)
//          L6-L7 two idle serial steps, back to L0
// aux[0]/aux[1] of the transform program select cos / sin on IN_1 / IN_2.
package tvdft_prog_pkg;
  import ucm_pkg::*;

  localparam int R11 = 0, R12 = 1, R21 = 3, R22 = 4;  // register indices

  // Serial step with one PE operation: dst <- PE(pe) = op(src_a, src_b).
  function automatic ucm_ctl_t pe_step(ucm_ctl_t w, int pe, pe_op_e op,
                                       int src_a, int src_b, int dst);
    ucm_ctl_t r = w;
    r.serial            = 1'b1;
    r.pe[pe].op         = op;
    r.pe[pe].src_a      = REG_SELW'(src_a);
    r.pe[pe].src_b      = REG_SELW'(src_b);
    r.regs[dst].mode    = R_SHIFT;
    r.regs[dst].sin_sel = PE_SELW'(pe + 1);
    // Source registers rotate so that their words survive the step.
    if (src_a != dst) begin r.regs[src_a].mode = R_SHIFT; r.regs[src_a].sin_sel = '0; end
    if (src_b != dst) begin r.regs[src_b].mode = R_SHIFT; r.regs[src_b].sin_sel = '0; end
    return r;
  endfunction

  function automatic ucm_ctl_t load(ucm_ctl_t w, int dst, reg_mode_e mode,
                                    logic [RAM_AW-1:0] ram_addr);
    ucm_ctl_t r = w;
    r.regs[dst].mode = mode;
    if (mode == R_LOAD_RAM) r.ram[dst / MAX_PE].addr = ram_addr;
    return r;
  endfunction

  function automatic ucm_ctl_t store(ucm_ctl_t w, int src, logic [RAM_AW-1:0] ram_addr);
    ucm_ctl_t r = w;
    r.ram[src / MAX_PE].we   = 1'b1;
    r.ram[src / MAX_PE].addr = ram_addr;
    r.ram[src / MAX_PE].wsrc = SLOT_SELW'(src % MAX_PE);
    return r;
  endfunction

  function automatic ucm_ctl_t idle_serial();
    ucm_ctl_t r = '0;
    r.serial = 1'b1;
    return r;
  endfunction

  localparam int GEN_LOOP = 4;
  localparam int TRF_LOOP = 6;

  // out_port 0: result on OUT_1, 1: result on OUT_2.
  function automatic ucm_prog_t gen_program(int out_port);
    ucm_prog_t p = '0;
    p[0]  = load(load('0, R11, R_LOAD_IN, 0), R21, R_LOAD_IN, 0);
    p[1]  = store(store('0, R11, 0), R21, 0);
    p[2]  = load('0, R21, R_LOAD_IN, 0);
    p[3]  = store('0, R21, 1);
    p[4]  = load(load(load('0, R11, R_LOAD_IN, 0), R12, R_LOAD_RAM, 0), R21, R_LOAD_RAM, 1);
    p[5]  = pe_step('0, 0, PE_ADD, R11, R12, R12);
    p[6]  = load(store('0, R12, 0), R22, R_LOAD_RAM, 0);
    p[7]  = pe_step('0, 0, PE_ADD, R21, R12, R21);
    p[8]  = store('0, R21, 1);
    p[9]  = pe_step('0, 1, PE_SUB, R22, R21, R22);
    p[10] = pe_step('0, 1, PE_MUL, R21, R22, R22);
    p[11].outp[out_port].we  = 1'b1;
    p[11].outp[out_port].sel = REG_SELW'(R22);
    p[11].jump   = 1'b1;
    p[11].target = CM_AW'(GEN_LOOP);
    return p;
  endfunction

  function automatic ucm_prog_t transform_program();
    ucm_prog_t p = '0;
    p[0]  = pe_step(pe_step('0, 0, PE_SUB, R11, R11, R11), 1, PE_SUB, R21, R21, R21);
    p[1]  = store(store('0, R11, 0), R21, 0);
    for (int i = 2; i < 6; i++) p[i] = idle_serial();
    p[6]  = load(load('0, R11, R_LOAD_IN, 0), R21, R_LOAD_IN, 0);
    p[7]  = load(load('0, R12, R_LOAD_IN, 0), R22, R_LOAD_IN, 0);
    p[7].aux = 2'b11;
    p[8]  = pe_step(pe_step('0, 0, PE_MUL, R11, R12, R11), 1, PE_MUL, R21, R22, R21);
    p[9]  = load(load('0, R12, R_LOAD_RAM, 0), R22, R_LOAD_RAM, 0);
    p[10] = pe_step(pe_step('0, 0, PE_ADD, R11, R12, R11), 1, PE_ADD, R21, R22, R21);
    p[11] = store(store('0, R11, 0), R21, 0);
    p[11].outp[0].we  = 1'b1;
    p[11].outp[0].sel = REG_SELW'(R11);
    p[11].outp[1].we  = 1'b1;
    p[11].outp[1].sel = REG_SELW'(R21);
    p[12] = idle_serial();
    p[13] = idle_serial();
    p[13].jump   = 1'b1;
    p[13].target = CM_AW'(TRF_LOOP);
    return p;
  endfunction

endpackage
