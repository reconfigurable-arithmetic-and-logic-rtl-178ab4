// Testbench of the R-ALU reservation station: issue order (oldest ready
// first), wakeup from the result buses (including a wakeup in the cycle of
// enqueue), waiting while the R-ALU is not configured for the oldest ready
// operation, filling all 8 entries and the free-entry count; then 3000
// cycles of random enqueues, broadcasts and issue permissions, compared
// cycle by cycle with a reference model of the station kept as a queue.
module tb_ralu_rs;
  import ralu_pkg::*;
  localparam int DEPTH = 8, ENQ_W = 4, NUM_WB = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [ENQ_W-1:0]  enq_valid = '0;
  rs_entry_t         enq_entry [ENQ_W];
  logic [3:0]        free_cnt;
  logic [NUM_WB-1:0] wb_valid = '0;
  logic [TAG_W-1:0]  wb_tag  [NUM_WB];
  logic [XLEN-1:0]   wb_data [NUM_WB];
  logic [3:0]        cls_ok = 4'hf;
  logic              iss_valid, iss_blocked;
  rs_entry_t         iss_entry;
  int checks = 0, failures = 0, nblocked = 0;

  ralu_rs #(.DEPTH(DEPTH), .ENQ_W(ENQ_W), .NUM_WB(NUM_WB)) dut (.*);

  logic [TAG_W-1:0] got_tag [$];
  logic [XLEN-1:0]  got_a   [$];
  always @(posedge clk) if (rst_n) begin
    if (iss_valid) begin got_tag.push_back(iss_entry.dst_tag); got_a.push_back(iss_entry.a_val); end
    if (iss_blocked) nblocked++;
  end

  function automatic rs_entry_t mk(ralu_op_e op, int dst, bit ardy, int atag, logic [63:0] aval);
    rs_entry_t e;
    e = '0;
    e.op = op; e.dst_tag = TAG_W'(dst);
    e.a_rdy = ardy; e.a_tag = TAG_W'(atag); e.a_val = aval;
    e.b_rdy = 1'b1; e.b_val = 64'd7;
    return e;
  endfunction

  task automatic expect_order(string what, int exp_tags [$]);
    checks++;
    if (got_tag.size() != exp_tags.size()) begin
      failures++;
      $display("FAIL %s: %0d issued, expected %0d", what, got_tag.size(), exp_tags.size());
    end else
      foreach (exp_tags[i])
        if (int'(got_tag[i]) != exp_tags[i]) begin
          failures++;
          $display("FAIL %s: issue %0d has tag %0d, expected %0d", what, i, got_tag[i], exp_tags[i]);
          break;
        end
    got_tag.delete();
  endtask

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, want); end
  endtask

  initial begin
    for (int w = 0; w < NUM_WB; w++) begin wb_tag[w] = '0; wb_data[w] = '0; end
    for (int k = 0; k < ENQ_W; k++) enq_entry[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq("free after reset", int'(free_cnt), 8);

    // 1. three entries, the oldest waits for tag 5
    enq_entry[0] = mk(OP_ADD, 10, 0, 5, 0);
    enq_entry[1] = mk(OP_XOR, 11, 1, 0, 1);
    enq_entry[2] = mk(OP_FADD, 12, 1, 0, 2);
    enq_valid = 4'b0111;
    @(negedge clk); enq_valid = '0;
    expect_eq("free after 3", int'(free_cnt), 5);
    repeat (3) @(negedge clk);
    wb_valid[1] = 1; wb_tag[1] = 5; wb_data[1] = 64'hABCD;
    @(negedge clk); wb_valid = '0;
    repeat (3) @(negedge clk);
    expect_order("oldest ready first", '{11, 12, 10});
    checks++;
    if (got_a[2] != 64'hABCD) begin failures++; $display("FAIL wakeup value %h", got_a[2]); end
    got_a.delete();

    // 2. the oldest ready operation waits for the adder to be configured
    cls_ok = 4'b1101;                         // CLS_ADD not allowed
    enq_entry[0] = mk(OP_SUB, 20, 1, 0, 0);
    enq_entry[1] = mk(OP_OR,  21, 1, 0, 0);
    enq_valid = 4'b0011;
    @(negedge clk); enq_valid = '0;
    repeat (3) @(negedge clk);
    expect_order("blocked", '{});
    expect_eq("blocked cycles", nblocked, 3);
    cls_ok = 4'hf;
    repeat (3) @(negedge clk);
    expect_order("after reconfiguration", '{20, 21});

    // 3. fill all 8 entries, all waiting on tag 9, woken by one broadcast;
    //    the last two are enqueued in the cycle of the broadcast
    for (int k = 0; k < 4; k++) enq_entry[k] = mk(OP_AND, 30 + k, 0, 9, 0);
    enq_valid = 4'b1111;
    @(negedge clk);
    for (int k = 0; k < 4; k++) enq_entry[k] = mk(OP_AND, 34 + k, 0, 9, 0);
    enq_valid = 4'b0011;
    @(negedge clk);
    enq_valid = 4'b0000;
    expect_eq("free after 6", int'(free_cnt), 2);
    for (int k = 0; k < 2; k++) enq_entry[k] = mk(OP_AND, 36 + k, 0, 9, 0);
    enq_valid = 4'b0011;
    wb_valid[0] = 1; wb_tag[0] = 9; wb_data[0] = 64'h55;
    @(negedge clk);
    enq_valid = '0; wb_valid = '0;
    expect_eq("free when full", int'(free_cnt), 0);
    repeat (10) @(negedge clk);
    expect_order("full queue", '{30, 31, 32, 33, 34, 35, 36, 37});
    expect_eq("free at end", int'(free_cnt), 8);

    // 4. random traffic against a reference model of the station: random
    //    enqueues (never more than free), broadcasts and issue permissions
    begin
      rs_entry_t m [$];
      for (int cyc = 0; cyc < 3000; cyc++) begin
        int nen, sel;
        @(negedge clk);
        enq_valid = '0;
        nen = $urandom_range(0, ENQ_W);
        if (nen > DEPTH - m.size()) nen = DEPTH - m.size();
        if (nen > int'(free_cnt)) nen = int'(free_cnt);   // keeps a faulty station running
        for (int k = 0; k < ENQ_W; k++) begin
          enq_entry[k] = '0;
          enq_entry[k].op = ralu_op_e'($urandom_range(0, 8));
          enq_entry[k].dst_tag = TAG_W'($urandom);
          enq_entry[k].a_rdy = 1'($urandom_range(0, 2) == 0);
          enq_entry[k].a_tag = TAG_W'($urandom_range(0, 15));
          enq_entry[k].a_val = {$urandom, $urandom};
          enq_entry[k].b_rdy = 1'($urandom_range(0, 2) == 0);
          enq_entry[k].b_tag = TAG_W'($urandom_range(0, 15));
          enq_entry[k].b_val = {$urandom, $urandom};
        end
        for (int k = 0; k < nen; k++) enq_valid[k] = 1'b1;
        for (int w = 0; w < NUM_WB; w++) begin
          wb_valid[w] = 1'($urandom_range(0, 1));
          wb_tag[w]   = TAG_W'($urandom_range(0, 15));
          wb_data[w]  = {$urandom, $urandom};
        end
        cls_ok = 4'($urandom_range(0, 15)) | 4'b0001;
        #1;
        // expected outputs from the model
        sel = -1;
        foreach (m[i]) if (sel < 0 && m[i].a_rdy && m[i].b_rdy) sel = i;
        expect_eq("random free", int'(free_cnt), DEPTH - m.size());
        expect_eq("random issue", int'(iss_valid), int'(sel >= 0 && cls_ok[op_class(m[sel].op)]));
        expect_eq("random blocked", int'(iss_blocked), int'(sel >= 0 && !cls_ok[op_class(m[sel].op)]));
        if (iss_valid && sel >= 0) begin
          checks++;
          if (iss_entry != m[sel]) begin
            failures++;
            $display("FAIL random issue entry: tag %0d, expected tag %0d", iss_entry.dst_tag, m[sel].dst_tag);
          end
        end
        // model update, as the station does at the next edge
        if (sel >= 0 && cls_ok[op_class(m[sel].op)]) m.delete(sel);
        for (int k = 0; k < nen; k++) m.push_back(enq_entry[k]);
        foreach (m[i])
          for (int w = 0; w < NUM_WB; w++)
            if (wb_valid[w]) begin
              if (!m[i].a_rdy && m[i].a_tag == wb_tag[w]) begin m[i].a_rdy = 1; m[i].a_val = wb_data[w]; end
              if (!m[i].b_rdy && m[i].b_tag == wb_tag[w]) begin m[i].b_rdy = 1; m[i].b_val = wb_data[w]; end
            end
      end
      enq_valid = '0; wb_valid = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
