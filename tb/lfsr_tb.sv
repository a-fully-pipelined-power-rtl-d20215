// lfsr_tb: self-checking testbench for the seeded LFSR.
//
// Two instances: the default 32-bit register (taps 32, 22, 2, 1) and the
// 12-bit register with taps 12 and 1. Checks:
//  * reset holds the register at zero in IDLE, also while seed_en is low;
//  * after seed_en, the state codes run IDLE, ENA, START and the seed appears
//    on the third clock;
//  * the 12-bit register, seeded with 0xAAA, gives the published sequence
//    AAA 555 AAB 556 AAC 559 AB3 566 ACC;
//  * 2000 steps of the 32-bit register match a bit-by-bit reference model;
//  * a reset in the middle of a run returns it to zero and IDLE.
`timescale 1ns/1ps
module lfsr_tb;
  import mcssta_pkg::*;

  logic clk = 1'b0;
  logic rst, seed_en;
  logic [31:0] seed32;
  logic [11:0] seed12;
  logic [31:0] q32;
  logic [11:0] q12;
  logic run32, run12;
  lfsr_state_e st32, st12;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr dut32 (.clk, .rst, .seed_en, .seed(seed32), .q(q32), .running(run32), .state(st32));
  lfsr #(.WIDTH(12), .TAPS(12'h801)) dut12
       (.clk, .rst, .seed_en, .seed(seed12), .q(q12), .running(run12), .state(st12));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference: x^32 + x^22 + x^2 + x + 1, shift left, new bit 0 = XOR of taps
  function automatic logic [31:0] ref32(logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  localparam logic [11:0] SEQ12 [9] = '{12'haaa, 12'h555, 12'haab, 12'h556, 12'haac,
                                        12'h559, 12'hab3, 12'h566, 12'hacc};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model;
    rst = 1'b1; seed_en = 1'b1; seed32 = 32'hDEAD_BEEF; seed12 = 12'haaa;
    repeat (3) @(posedge clk);
    #1;
    check(q32 == 0 && q12 == 0, "reset clears the register");
    check(st32 == IDLE && st12 == IDLE, "reset state is IDLE");

    // seed_en low: stay in IDLE at zero
    seed_en = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    repeat (4) @(posedge clk);
    #1 check(st32 == IDLE && q32 == 0, "IDLE holds without seed_en");

    // start
    seed_en = 1'b1;
    @(posedge clk); #1;
    check(st32 == ENA && st12 == ENA, "IDLE -> ENA");
    check(q32 == 0 && !run32, "register still zero in ENA");
    @(posedge clk); #1;
    check(st32 == START && run32 && run12, "ENA -> START");
    check(q32 == seed32, "seed loaded (32-bit)");
    check(q12 == 12'haaa, "seed loaded (12-bit)");

    // 12-bit published sequence
    for (int i = 1; i < 9; i++) begin
      @(posedge clk); #1;
      check(q12 == SEQ12[i], $sformatf("12-bit step %0d: got %h expected %h", i, q12, SEQ12[i]));
    end

    // 32-bit against the reference (already 8 steps past the seed)
    model = seed32;
    for (int i = 0; i < 8; i++) model = ref32(model);
    check(q32 == model, "32-bit after 8 steps");
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      model = ref32(model);
      if (q32 != model) check(1'b0, $sformatf("32-bit step %0d", i));
      else checks++;
      if (q32 == 0) check(1'b0, "32-bit register reached zero");
    end

    // reset in the middle of a run
    rst = 1'b1;
    @(posedge clk); #1;
    check(q32 == 0 && st32 == IDLE && !run32, "reset during run");
    rst = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
