// Testbench of the steering logic: directed dispatch groups check where
// each instruction class goes, the balancing between the R-ALU and integer
// stations, load/stores sent to both the address station and the R-ALU,
// and the in-order stop when a station is full. A random part checks that
// no station is ever given more instructions than it has free entries and
// that accept is a prefix of the group.
module tb_ralu_steer;
  import ralu_pkg::*;
  localparam int W = 4;
  instr_cls_e cls [W];
  logic [4:0] ralu_free, int_free, addr_free, fp_free;
  logic [W-1:0] accept, to_ralu, to_int, to_addr, to_fp;
  int checks = 0, failures = 0;

  ralu_steer #(.W(W)) dut (.*);

  task automatic grp(string what, instr_cls_e c0, instr_cls_e c1, instr_cls_e c2, instr_cls_e c3,
                     int rf, int inf, int af, int ff,
                     logic [3:0] e_acc, logic [3:0] e_ralu, logic [3:0] e_int,
                     logic [3:0] e_addr, logic [3:0] e_fp);
    cls[0] = c0; cls[1] = c1; cls[2] = c2; cls[3] = c3;
    ralu_free = 5'(rf); int_free = 5'(inf); addr_free = 5'(af); fp_free = 5'(ff);
    #1;
    checks++;
    if ({accept, to_ralu, to_int, to_addr, to_fp} != {e_acc, e_ralu, e_int, e_addr, e_fp}) begin
      failures++;
      $display("FAIL %s: acc %b ralu %b int %b addr %b fp %b", what, accept, to_ralu, to_int,
               to_addr, to_fp);
    end
  endtask

  initial begin
    // bit k of each mask is slot k
    grp("one of each", IC_FADD, IC_FOTH, IC_IOTH, IC_NONE, 8, 16, 16, 8,
        4'b0111, 4'b0001, 4'b0100, 4'b0000, 4'b0010);
    // empty stations: R-ALU 8/8 vs integer 16/16 -> R-ALU; 7/8 < 16/16 and
    // 7/8 < 15/16 -> integer; 7/8 = 14/16 -> R-ALU
    grp("balance", IC_IALU, IC_IALU, IC_IALU, IC_IALU, 8, 16, 16, 8,
        4'b1111, 4'b1001, 4'b0110, 4'b0000, 4'b0000);
    grp("integer station fuller", IC_IALU, IC_IALU, IC_IALU, IC_NONE, 8, 4, 16, 8,
        4'b0111, 4'b0111, 4'b0000, 4'b0000, 4'b0000);
    grp("memory", IC_MEM, IC_MEM, IC_NONE, IC_NONE, 8, 16, 16, 8,
        4'b0011, 4'b0001, 4'b0000, 4'b0011, 4'b0000);
    grp("R-ALU full stops FP add", IC_IALU, IC_FADD, IC_FOTH, IC_IOTH, 0, 16, 16, 8,
        4'b0001, 4'b0000, 4'b0001, 4'b0000, 4'b0000);
    grp("integer full, R-ALU takes it", IC_IALU, IC_IALU, IC_IOTH, IC_FOTH, 2, 0, 16, 8,
        4'b0011, 4'b0011, 4'b0000, 4'b0000, 4'b0000);
    grp("address full", IC_IALU, IC_MEM, IC_IALU, IC_NONE, 8, 16, 0, 8,
        4'b0001, 4'b0001, 4'b0000, 4'b0000, 4'b0000);

    for (int i = 0; i < 5000; i++) begin
      int nr, ni, na, nf;
      bit stopped;
      for (int k = 0; k < W; k++) cls[k] = instr_cls_e'($urandom_range(0, 5));
      ralu_free = 5'($urandom_range(0, 8)); int_free = 5'($urandom_range(0, 16));
      addr_free = 5'($urandom_range(0, 16)); fp_free = 5'($urandom_range(0, 8));
      #1;
      nr = $countones(to_ralu); ni = $countones(to_int); na = $countones(to_addr); nf = $countones(to_fp);
      stopped = 0;
      checks++;
      for (int k = 0; k < W; k++) begin
        if (cls[k] != IC_NONE && !accept[k]) stopped = 1;
        if (stopped && accept[k]) begin failures++; $display("FAIL accept not a prefix"); break; end
        if (cls[k] == IC_FADD && accept[k] && !to_ralu[k]) begin failures++; $display("FAIL FP add not to R-ALU"); end
        if (cls[k] == IC_MEM && accept[k] && !to_addr[k]) begin failures++; $display("FAIL memory op not to address station"); end
      end
      if (nr > int'(ralu_free) || ni > int'(int_free) || na > int'(addr_free) || nf > int'(fp_free)) begin
        failures++;
        $display("FAIL station overfilled");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
