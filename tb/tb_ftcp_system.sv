// tb_ftcp_system: end-to-end test of the FTCP system at its full default size
// (64K-word program memory, 8K-word data memory, 64K-word stacks).
//
// Three programs are placed in program memory through the load port, each
// followed by a reset:
//   A  every instruction: arithmetic, shifts, logic, comparisons, stack
//      shuffles, >R/R>, ENTER, ! and @, nested CALL/RETURN, a RETURN right
//      after an instruction that changes TOR, an empty subroutine, IF taken
//      and not taken, DO ... LOOP. Results are stored to data memory and
//      compared with values worked out by hand; the cycle distance between
//      stores checks the 1-cycle / 2-cycle instruction timing.
//   B  interrupts: an uninhibited and an inhibited entry (cycle by cycle, as
//      in the timing diagrams), an interrupt held off by DI and taken after
//      EI, and a service routine that keeps the interrupted stack intact.
//   C  stack limits: data stack overflow and underflow, return stack
//      underflow and overflow.
// Every mechanism (call, return, return with forwarded TOR, IF taken / not
// taken, LOOP back / exit, store, fetch, ENTER, both interrupt kinds, the four
// stack limit events) is counted, and one that never happened is a failure.
module tb_ftcp_system;
  import ftcp_tb_pkg::*;
  import ftcp_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load_we = 1'b0;
  logic [15:0] load_addr = '0, load_data = '0;
  logic        int_n = 1'b1;
  logic [15:0] int_vector = 16'h9000;
  logic        intack_n, memrq_n, rd_wr_n, int_enabled;
  logic [15:0] bus_addr, bus_dout;
  logic        ds_overflow, ds_underflow, rs_overflow, rs_underflow;

  ftcp_system dut (
    .clk, .rst_n, .load_we, .load_addr, .load_data,
    .int_n, .int_vector, .intack_n,
    .bus_addr, .bus_dout, .memrq_n, .rd_wr_n, .int_enabled,
    .ds_overflow, .ds_underflow, .rs_overflow, .rs_underflow
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- program
  logic [15:0] img_addr [$];
  logic [15:0] img_data [$];
  logic [15:0] at;

  task automatic org(input logic [15:0] a);
    at = a;
  endtask
  task automatic put(input logic [15:0] w);
    img_addr.push_back(at);
    img_data.push_back(w);
    at++;
  endtask
  task automatic lit(input logic [15:0] v);
    put(T_ENTER);
    put(v);
  endtask
  // IF / LOOP to an absolute target; the word after is the NOP slot.
  task automatic put_if(input logic [15:0] target);
    put(t_if(int'(target) - int'(at + 16'd1)));
    put(T_NOP);
  endtask
  task automatic put_loop(input logic [15:0] target);
    put(t_loop(int'(target) - int'(at + 16'd1)));
    put(T_NOP);
  endtask
  task automatic halt();
    logic [15:0] h;
    h = at;
    lit(16'd0);
    put_if(h);
  endtask

  task automatic load_and_reset();
    rst_n = 1'b0;
    @(negedge clk);
    foreach (img_addr[i]) begin
      load_we   = 1'b1;
      load_addr = img_addr[i];
      load_data = img_data[i];
      @(negedge clk);
    end
    load_we = 1'b0;
    img_addr.delete();
    img_data.delete();
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // ------------------------------------------------------- bus observation
  logic [15:0] wr_data [logic [15:0]];
  longint      wr_cycle [logic [15:0]];
  always @(posedge clk) begin
    if (rst_n && !memrq_n && !rd_wr_n) begin
      wr_data[bus_addr]  = bus_dout;
      wr_cycle[bus_addr] = cycle;
    end
  end

  function automatic logic [15:0] stored(input logic [15:0] a);
    return wr_data.exists(a) ? wr_data[a] : 16'hDEAD;
  endfunction

  // ---------------------------------------------------- mechanism counters
  int n_call, n_ret, n_ret_fwd, n_if_t, n_if_n, n_loop_b, n_loop_x;
  int n_store, n_fetch, n_enter, n_int_plain, n_int_inhib;
  int n_ds_ovf, n_ds_unf, n_rs_ovf, n_rs_unf;
  int unsigned max_sp;

  always @(negedge clk) begin
    if (rst_n) begin
      automatic ctrl_t ex = dut.u_core.ex;
      if (dut.u_core.u_control.cl_call && dut.u_core.pc_sel == PC_IB) n_call++;
      if (dut.u_core.u_control.cl_return && dut.u_core.pc_sel == PC_TOR) begin
        n_ret++;
        if (ex.rs_op != RS_HOLD) n_ret_fwd++;
      end
      if (ex.branch == BR_IF)   begin if (dut.u_core.u_control.cr_branch_taken) n_if_t++;   else n_if_n++;   end
      if (ex.branch == BR_LOOP) begin if (dut.u_core.u_control.cr_branch_taken) n_loop_b++; else n_loop_x++; end
      if (ex.mem && !ex.mem_read) n_store++;
      if (ex.mem &&  ex.mem_read) n_fetch++;
      if (ex.is_enter) n_enter++;
      if (ds_overflow)  n_ds_ovf++;
      if (ds_underflow) n_ds_unf++;
      if (rs_overflow)  n_rs_ovf++;
      if (rs_underflow) n_rs_unf++;
      if (dut.u_core.u_dstack.sp > max_sp) max_sp = dut.u_core.u_dstack.sp;
    end
  end
  always @(posedge clk) begin
    if (rst_n && dut.u_core.u_control.int_state == IS_NORMAL) begin
      if (dut.u_core.u_control.u_int.next == IS_INHIBIT) n_int_plain++;
      if (dut.u_core.u_control.u_int.next == IS_WAIT)    n_int_inhib++;
    end
  end

  task automatic wait_pc(input logic [15:0] a, input int limit);
    int n = 0;
    while (dut.u_core.u_pc.pc != a && n < limit) begin
      @(negedge clk);
      n++;
    end
    check(n < limit, $sformatf("PC reached %h", a));
  endtask

  task automatic run_until_store(input logic [15:0] a, input int limit);
    int n = 0;
    while (!wr_data.exists(a) && n < limit) begin
      @(negedge clk);
      n++;
    end
    check(n < limit, $sformatf("store to %h happened", a));
  endtask

  // Watchdog.
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- phases
  logic [15:0] call_s3_at, enter_y, if_y, x_sled, z_di;

  initial begin
    // ============================ A: instruction set =====================
    org(16'h0000);
    lit(5); lit(3); put(T_ADD);    put(t_store(13'h100));  // 8
    lit(5); lit(3); put(T_SUB);    put(t_store(13'h101));  // 2
    lit(16'hFFFD); put(T_MUL2);    put(t_store(13'h102));  // -6 = FFFA
    lit(16'h4001); put(T_MUL2);    put(t_store(13'h103));  // sign kept: 0002
    lit(16'h8004); put(T_DIV2);    put(t_store(13'h104));  // C002
    lit(16'h8004); put(T_SHIFTR);  put(t_store(13'h105));  // 4002
    lit(16'h00F0); put(T_NOT);     put(t_store(13'h106));  // FF0F
    lit(16'h0FF0); lit(16'h00FF); put(T_NAND); put(t_store(13'h107)); // FF0F
    lit(16'h0FF0); lit(16'h00FF); put(T_XOR);  put(t_store(13'h108)); // 0F0F
    lit(16'hFFFE); lit(1); put(T_GT); put(t_store(13'h109));  // -2 > 1: 0
    lit(16'hFFFE); lit(1); put(T_LT); put(t_store(13'h10A));  // -2 < 1: FFFF
    lit(7); lit(7); put(T_EQ); put(t_store(13'h10B));         // FFFF
    lit(7); put(T_DUP); put(T_ADD); put(t_store(13'h10C));    // 14
    lit(1); lit(2); put(T_SWAP); put(T_SUB); put(t_store(13'h10D)); // 2-1 = 1
    lit(1); lit(2); put(T_DROP); put(t_store(13'h10E));       // 1
    lit(9); put(T_TOR); put(T_FROMR); put(t_store(13'h10F));  // 9
    put(t_fetch(13'h100)); put(t_fetch(13'h101)); put(T_ADD); put(t_store(13'h110)); // 10
    lit(16'h3); lit(16'h5); put(T_EQ); put(t_store(13'h117)); // 0
    put(t_call(16'h8000));                                     // S1
    lit(16'h44); put(t_store(13'h118));
    call_s3_at = at;
    put(t_call(16'h8020));                                     // S3
    put(t_call(16'h8030));                                     // S4 (empty)
    // IF taken: skip the 0BAD store.
    begin
      logic [15:0] tgt;
      lit(0); put(t_if(4)); put(T_NOP);     // target = NOP slot + 4
      lit(16'h0BAD); put(t_store(13'h114));
      tgt = at;
      lit(1); put(t_store(13'h114));
    end
    // IF not taken.
    lit(5); put(t_if(4)); put(T_NOP);
    lit(16'h22); put(t_store(13'h115));
    // DO ... LOOP: body runs count+1 times.
    begin
      logic [15:0] body;
      lit(0); lit(4); put(T_DO);
      body = at;
      lit(1); put(T_ADD);
      put_loop(body);
      put(t_store(13'h116));                                   // 5
    end
    lit(16'hD0E5); put(t_store(13'h1FF));
    halt();
    // Subroutines in the upper half.
    org(16'h8000);                                             // S1
    lit(16'h55); put(t_store(13'h111)); put(t_call(16'h8010)); put(T_RETURN);
    org(16'h8010);                                             // S2
    lit(16'h66); put(t_store(13'h112)); put(T_RETURN);
    org(16'h8020);                                             // S3
    put(T_FROMR); put(T_DUP); put(t_store(13'h113)); put(T_TOR); put(T_RETURN);
    org(16'h8030);                                             // S4
    put(T_RETURN);

    load_and_reset();
    run_until_store(16'h1FF, 2000);
    check(stored(16'h100) == 16'd8,    "+");
    check(stored(16'h101) == 16'd2,    "-");
    check(stored(16'h102) == 16'hFFFA, "2* of -3");
    check(stored(16'h103) == 16'h0002, "2* keeps sign bit");
    check(stored(16'h104) == 16'hC002, "2/");
    check(stored(16'h105) == 16'h4002, "SHIFTR");
    check(stored(16'h106) == 16'hFF0F, "NOT");
    check(stored(16'h107) == 16'hFF0F, "NAND");
    check(stored(16'h108) == 16'h0F0F, "XOR");
    check(stored(16'h109) == 16'h0000, "> false (signed)");
    check(stored(16'h10A) == 16'hFFFF, "< true (signed)");
    check(stored(16'h10B) == 16'hFFFF, "= true");
    check(stored(16'h117) == 16'h0000, "= false");
    check(stored(16'h10C) == 16'd14,   "DUP +");
    check(stored(16'h10D) == 16'd1,    "SWAP -");
    check(stored(16'h10E) == 16'd1,    "DROP");
    check(stored(16'h10F) == 16'd9,    ">R R>");
    check(stored(16'h110) == 16'd10,   "@ @ +");
    check(stored(16'h111) == 16'h55,   "CALL S1");
    check(stored(16'h112) == 16'h66,   "nested CALL S2");
    check(stored(16'h118) == 16'h44,   "returned to main");
    check(stored(16'h113) == call_s3_at + 16'd1, "R> sees the return address");
    check(stored(16'h114) == 16'd1,    "IF taken skips code");
    check(stored(16'h115) == 16'h22,   "IF not taken falls through");
    check(stored(16'h116) == 16'd5,    "DO 4 ... LOOP runs 5 times");
    // Timing: ! (2) + ENTER (2) + ENTER (2) + - (1)
    check(wr_cycle[16'h101] - wr_cycle[16'h100] == 7, "1- and 2-cycle timing");
    // ! (2) + CALL (1) + ENTER (2)
    check(wr_cycle[16'h112] - wr_cycle[16'h111] == 5, "CALL takes one cycle");
    // ! (2) + RETURN (1) + RETURN (1) + ENTER (2)
    check(wr_cycle[16'h118] - wr_cycle[16'h112] == 6, "RETURN takes one cycle");
    // ! (2) + ENTER + ENTER (4) + DO (1) + 5 x (ENTER, +, LOOP, NOP) (25)
    check(wr_cycle[16'h116] - wr_cycle[16'h115] == 32, "DO ... LOOP timing");
    repeat (20) @(negedge clk);
    check(dut.u_core.u_dstack.sp <= 1 && dut.u_core.u_rstack.rsp == 0, "stacks balanced after program A");

    // ============================ B: interrupts ==========================
    wr_data.delete();
    org(16'h0000);
    lit(0); put(t_store(13'h121));
    lit(16'h10); lit(16'h20);         // must survive the interrupts
    put(T_EI);
    x_sled = 16'h0040;
    while (at < 16'h0080) put(T_NOP);
    enter_y = at;  lit(1);            // IF not taken while interrupted
    if_y = at;     put(t_if(16)); put(T_NOP);
    while (at < 16'h00C0) put(T_NOP);
    z_di = at;     put(T_DI);
    while (at < 16'h00E0) put(T_NOP);
    put(T_EI);
    while (at < 16'h0100) put(T_NOP);
    put(T_ADD); put(t_store(13'h122));  // 0x30 if the stack survived
    lit(16'hD0E5); put(t_store(13'h1FF));
    halt();
    org(16'h9000);                    // service routine
    lit(16'h77); put(t_store(13'h120));
    put(t_fetch(13'h121)); lit(1); put(T_ADD); put(t_store(13'h121));
    put(T_RETURN);

    load_and_reset();
    // B1: uninhibited (Figure-6 style): INT seen while the instruction before
    // x_sled executes and x_sled is in the pipeline.
    wait_pc(x_sled, 200);
    int_n = 1'b0;
    @(negedge clk); check(dut.u_core.u_pc.pc == x_sled + 1, "B1 PC 3 after 2");
    check(intack_n, "B1 no ack yet");
    @(negedge clk); check(dut.u_core.u_pc.pc == x_sled + 1, "B1 PC inhibited");
    check(bus_dout == x_sled + 1, "B1 PC on data bus");
    @(negedge clk); check(dut.u_core.u_pc.pc == x_sled + 1, "B1 PC still held");
    check(!intack_n, "B1 INTACK low 3 cycles after INT is seen");
    check(dut.u_core.tor == x_sled + 1, "B1 return address in TOR");
    int_n = 1'b1;
    @(negedge clk); check(dut.u_core.u_pc.pc == 16'h9000, "B1 vector in PC");
    check(intack_n, "B1 INTACK one cycle");
    // B2: inhibited (Figure-7 style): INT seen while the IF is in the pipeline.
    wait_pc(if_y, 400);
    int_n = 1'b0;
    @(negedge clk); check(dut.u_core.u_control.u_int.state == IS_WAIT, "B2 waits one cycle");
    @(negedge clk); check(intack_n, "B2 no ack yet");
    @(negedge clk);
    @(negedge clk); check(!intack_n, "B2 INTACK low 4 cycles after INT is seen");
    check(dut.u_core.tor == if_y + 2, "B2 return address after the IF and its NOP");
    int_n = 1'b1;
    @(negedge clk); check(dut.u_core.u_pc.pc == 16'h9000, "B2 vector in PC");
    // B3: held off by DI, taken after EI.
    wait_pc(z_di + 2, 400);
    int_n = 1'b0;
    begin
      int held = 0;
      while (dut.u_core.u_pc.pc != 16'h00E1) begin
        @(negedge clk);
        if (!intack_n) held++;
      end
      check(held == 0, "B3 no acknowledge while disabled");
      while (intack_n) @(negedge clk);
      int_n = 1'b1;
      check(dut.u_core.tor >= 16'h00E1 && dut.u_core.tor <= 16'h00E3, "B3 taken after EI");
    end
    run_until_store(16'h1FF, 2000);
    check(stored(16'h120) == 16'h77, "service routine ran");
    check(stored(16'h121) == 16'd3,  "three interrupts serviced");
    check(stored(16'h122) == 16'h30, "stack intact across interrupts");

    // ============================ C: stack limits ========================
    org(16'h0000);
    lit(7); lit(16'hFFFF); put(T_DO);
    begin
      logic [15:0] b;
      b = at; put(T_DUP); put_loop(b);
    end
    lit(16'hFFFF); put(T_DO);
    begin
      logic [15:0] b;
      b = at; put(T_DROP); put_loop(b);
    end
    put(T_FROMR);                      // return stack empty: underflow
    put(t_call(16'h8000));
    halt();
    org(16'h8000);
    put(t_call(16'h8000));             // endless recursion: overflow
    load_and_reset();
    begin
      int n = 0;
      while (n_rs_ovf == 0 && n < 1_500_000) begin @(negedge clk); n++; end
    end
    check(max_sp == 32'hFFFF, "data stack filled to 65535 words");

    // ============================ mechanisms =============================
    $display("mechanisms: call=%0d return=%0d return_fwd=%0d if_taken=%0d if_not=%0d loop_back=%0d loop_exit=%0d store=%0d fetch=%0d enter=%0d int=%0d int_inhibited=%0d ds_ovf=%0d ds_unf=%0d rs_ovf=%0d rs_unf=%0d",
             n_call, n_ret, n_ret_fwd, n_if_t, n_if_n, n_loop_b, n_loop_x, n_store, n_fetch,
             n_enter, n_int_plain, n_int_inhib, n_ds_ovf, n_ds_unf, n_rs_ovf, n_rs_unf);
    check(n_call > 0,      "CALL happened");
    check(n_ret > 0,       "RETURN happened");
    check(n_ret_fwd > 0,   "RETURN with TOR forwarded happened");
    check(n_if_t > 0,      "IF taken happened");
    check(n_if_n > 0,      "IF not taken happened");
    check(n_loop_b > 0,    "LOOP back happened");
    check(n_loop_x > 0,    "LOOP exit happened");
    check(n_store > 0,     "store happened");
    check(n_fetch > 0,     "fetch happened");
    check(n_enter > 0,     "ENTER happened");
    check(n_int_plain > 0, "uninhibited interrupt happened");
    check(n_int_inhib > 0, "inhibited interrupt happened");
    check(n_ds_ovf > 0,    "data stack overflow happened");
    check(n_ds_unf > 0,    "data stack underflow happened");
    check(n_rs_ovf > 0,    "return stack overflow happened");
    check(n_rs_unf > 0,    "return stack underflow happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
