// tb_itr_recovery: self-checking test of the retry / abort controller.
// Directed sequences (fault then clean retry; fault then repeated fault;
// fault then a different trace faulting) followed by a random stream of
// commit events checked against a two-state reference model.
module tb_itr_recovery;
  import itr_pkg::*;

  logic clk = 0, rst_n;
  logic commit_ack, commit_fault;
  pc_t  head_pc;
  logic flush, abort_req, recovered, rec_fault, retrying;
  pc_t  restart_pc;

  itr_recovery dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_flush = 0, n_abort = 0, n_recov = 0;
  bit   m_retry = 0;
  pc_t  m_pc = '0;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one commit event and compare with the model.
  task automatic step(bit ack, bit fault, pc_t pc);
    bit e_flush, e_abort, e_recov;
    @(negedge clk);
    commit_ack = ack; commit_fault = fault; head_pc = pc;
    e_flush = fault;
    e_abort = fault && m_retry && (pc == m_pc);
    e_recov = ack && m_retry && (pc == m_pc);
    #1;
    checks++;
    if (flush !== e_flush || abort_req !== e_abort || recovered !== e_recov ||
        rec_fault !== e_abort || retrying !== m_retry || (fault && restart_pc !== pc)) begin
      failures++;
      $display("%0t: flush %0b/%0b abort %0b/%0b recovered %0b/%0b retrying %0b/%0b",
               $time, flush, e_flush, abort_req, e_abort, recovered, e_recov, retrying, m_retry);
    end
    n_flush += int'(e_flush); n_abort += int'(e_abort); n_recov += int'(e_recov);
    if (e_abort || e_recov) m_retry = 0;
    else if (fault) begin m_retry = 1; m_pc = pc; end
  endtask

  initial begin
    rst_n = 0; commit_ack = 0; commit_fault = 0; head_pc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fault, then the retried trace passes: recovery
    step(0, 1, 32'h100); step(0, 0, 32'h0); step(1, 0, 32'h100);
    // fault, then the retried trace fails again: abort
    step(0, 1, 32'h200); step(0, 1, 32'h200); step(1, 0, 32'h300);
    // fault, then another trace faults first: new retry, then recovery
    step(0, 1, 32'h400); step(0, 1, 32'h500); step(1, 0, 32'h500);
    for (int i = 0; i < 5000; i++) begin
      bit a, f;
      a = ($urandom_range(99) < 40);
      f = !a && ($urandom_range(99) < 20);
      step(a, f, 32'h1000 + 32'(4 * $urandom_range(3)));
    end
    checks++;
    if (n_flush == 0 || n_abort == 0 || n_recov == 0) begin
      failures++; $display("a recovery case never happened");
    end
    $display("flushes %0d aborts %0d recoveries %0d", n_flush, n_abort, n_recov);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
