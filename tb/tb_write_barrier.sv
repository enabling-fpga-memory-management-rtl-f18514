// tb_write_barrier: self-checking test of the write barrier.
//
// Random write traffic passes through a barrier with a 3-bit counter (at most
// 7 writes outstanding). The memory side accepts requests and returns write
// responses after random delays. Every cycle the testbench compares
// 'outstanding' and 'idle' with its own count of accepted requests minus
// responses, checks that the three channels pass through unchanged and in the
// same cycle, and that no request is let through while 7 are outstanding.
`timescale 1ns/1ps
module tb_write_barrier;
  import vm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic s_req_valid = 0, s_req_ready, s_dat_valid = 0, s_dat_ready, s_rsp_valid, s_rsp_ready = 0;
  bus_req_t s_req = '0; bus_wdat_t s_dat = '0;
  logic m_req_valid, m_req_ready = 0, m_dat_valid, m_dat_ready = 0, m_rsp_valid = 0, m_rsp_ready;
  bus_req_t m_req; bus_wdat_t m_dat;
  logic idle; logic [2:0] outstanding;
  write_barrier #(.CNT_W(3)) dut (.*);

  int ref_cnt = 0, pending = 0, n_full = 0, n_resp = 0;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      // drive random inputs
      s_req_valid = $urandom_range(0, 1);
      s_req.addr  = {$urandom, $urandom}; s_req.len = 8'($urandom);
      s_dat_valid = $urandom_range(0, 1); s_dat.data = {16{$urandom}}; s_dat.last = 1'($urandom);
      m_req_ready = $urandom_range(0, 3) != 0;
      m_dat_ready = $urandom_range(0, 1);
      m_rsp_valid = (pending > 0) && ($urandom_range(0, 3) == 0);
      s_rsp_ready = $urandom_range(0, 3) != 0;
      #1;
      // pass-through
      check(m_req == s_req && m_dat == s_dat && m_dat_valid == s_dat_valid && s_dat_ready == m_dat_ready
            && s_rsp_valid == m_rsp_valid && m_rsp_ready == s_rsp_ready, "channels pass through");
      check(outstanding == 3'(ref_cnt) && idle == (ref_cnt == 0), $sformatf("count %0d expected %0d", outstanding, ref_cnt));
      if (ref_cnt == 7) begin
        n_full++;
        check(!m_req_valid && !s_req_ready, "no request while the counter is full");
      end else check(m_req_valid == s_req_valid && s_req_ready == m_req_ready, "request passes");
      @(posedge clk);
      if (m_req_valid && m_req_ready) begin ref_cnt++; pending++; end
      if (m_rsp_valid && m_rsp_ready) begin ref_cnt--; pending--; n_resp++; end
    end
    check(n_full > 0, "counter full at least once");
    check(n_resp > 100, "responses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
