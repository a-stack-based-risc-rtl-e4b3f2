// tb_ftcp_mix: throughput of the FTCP on an instruction mix. A straight-line
// block of 100 instructions is generated in which a given number are two-cycle
// instructions (ENTER, @, !) and the rest single-cycle (DUP, DROP, +, XOR,
// SWAP, NOT, 2*, NOP), with the stack depth kept in range. The block is run
// between two marker stores and its cycle count is checked against
// 1 x single + 2 x double: 135 cycles for a 35 % two-cycle mix and 117 cycles
// for a 17 % mix (the mixes of the processor's performance estimate, with and
// without a separate data address bus). The data stack depth after the block
// is checked against the generator's model.
module tb_ftcp_mix;
  import ftcp_tb_pkg::*;

  logic clk = 0, rst_n = 0, load_we = 0;
  logic [15:0] load_addr = '0, load_data = '0;
  logic int_n = 1, intack_n, memrq_n, rd_wr_n, int_enabled;
  logic [15:0] bus_addr, bus_dout;
  logic ds_overflow, ds_underflow, rs_overflow, rs_underflow;
  int checks = 0, failures = 0;
  longint cycle = 0;
  longint t_start, t_end;

  ftcp_system #(.DSTACK_AW(6), .RSTACK_AW(4)) dut (
    .clk, .rst_n, .load_we, .load_addr, .load_data, .int_n, .int_vector(16'h0),
    .intack_n, .bus_addr, .bus_dout, .memrq_n, .rd_wr_n, .int_enabled,
    .ds_overflow, .ds_underflow, .rs_overflow, .rs_underflow
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n && !memrq_n && !rd_wr_n) begin
    if (bus_addr == 16'h1F0) t_start = cycle;
    if (bus_addr == 16'h1F1) t_end = cycle;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  logic [15:0] img [$];
  task automatic put(input logic [15:0] w); img.push_back(w); endtask

  task automatic run_mix(input int n_total, input int n_two);
    int depth, two_left, one_left, cycles;
    longint t0;
    img.delete();
    t_start = -1; t_end = -1;
    depth = 2;                                  // TOS and SOS
    repeat (4) begin put(T_ENTER); put(16'($urandom)); depth++; end
    put(T_DUP); depth++;
    put(t_store(13'h1F0)); depth--;
    two_left = n_two; one_left = n_total - n_two;
    while (two_left + one_left > 0) begin
      bit two = ($urandom_range(1, two_left + one_left) <= two_left);
      int r = $urandom_range(0, 99);
      if (two) begin
        two_left--;
        if (depth > 10 || (depth > 3 && r < 40)) begin put(t_store(13'($urandom_range(0, 255)))); depth--; end
        else if (r < 70) begin put(T_ENTER); put(16'($urandom)); depth++; end
        else begin put(t_fetch(13'($urandom_range(0, 255)))); depth++; end
      end else begin
        one_left--;
        if (depth < 4 || (depth < 10 && r < 25)) begin put(T_DUP); depth++; end
        else if (r < 40) begin put(T_DROP); depth--; end
        else if (r < 55) begin put(T_ADD); depth--; end
        else if (r < 70) begin put(T_XOR); depth--; end
        else if (r < 80) put(T_SWAP);
        else if (r < 88) put(T_NOT);
        else if (r < 94) put(T_MUL2);
        else put(T_NOP);
      end
    end
    put(T_DUP); depth++;
    put(t_store(13'h1F1)); depth--;
    put(T_ENTER); put(16'h0); put(t_if(-3)); put(T_NOP);  // idle
    rst_n = 0;
    @(negedge clk);
    foreach (img[i]) begin
      load_we = 1; load_addr = 16'(i); load_data = img[i];
      @(negedge clk);
    end
    load_we = 0;
    @(negedge clk);
    rst_n = 1;
    t0 = cycle;
    while (t_end < 0 && cycle - t0 < 2000) @(negedge clk);
    // From the first marker store: the store itself (2), the mix, the DUP (1).
    cycles = int'(t_end - t_start) - 3;
    $display("mix: %0d instructions, %0d two-cycle: %0d cycles (%0d.%02d cycles/instruction)",
             n_total, n_two, cycles, cycles / n_total, (cycles * 100 / n_total) % 100);
    chk(t_start >= 0 && t_end >= 0, "both markers stored");
    chk(cycles == (n_total - n_two) + 2 * n_two, "cycle count = single + 2 x double");
    chk(int'(dut.u_core.u_dstack.sp) == depth - 2, "data stack depth");
    chk(!ds_overflow && !ds_underflow, "no stack limit hit");
  endtask

  initial begin
    run_mix(100, 35);   // 1.35 cycles per instruction
    run_mix(100, 17);   // 1.17 cycles per instruction
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
