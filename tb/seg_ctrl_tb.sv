// seg_ctrl_tb: the control unit against the phase table, written out here
// as a reference model (outputs as a 9-tuple muxC, tmp, tbl, lat, req, xlat,
// done, ack, phase). Inputs are random each cycle, with requests and fetch
// completions frequent enough to reach every phase and every exit of
// phases 1 and 3; each is counted.
module seg_ctrl_tb;
  import mmu_pkg::*;
  int checks = 0, failures = 0;
  int n_phase [6];
  int n_tpw = 0, n_pass = 0, n_grant = 0, n_fail = 0, n_wait = 0;

  logic   clk = 0, rst_n = 0;
  logic   req_in, sup, match, sec_ok, fdone;
  rwe_t   rwe;
  muxc_e  mux_c;
  logic   tmp_c, tbl_c, l_c, r_req, xlat, done, ack;
  phase_e phase;

  // reference state: {muxC[1:0], tmp, tbl, lat, req, xlat, done, ack, phase[2:0]}
  logic [11:0] m, got;

  seg_ctrl dut (.clk, .rst_n, .req_in, .sup, .rwe, .match, .sec_ok, .fdone,
                .mux_c, .tmp_c, .tbl_c, .l_c, .r_req, .xlat, .done, .ack, .phase);

  function automatic logic [11:0] t(input int mc, input logic [6:0] f, input int ph);
    return {2'(mc), f, 3'(ph)};
  endfunction

  function automatic logic [11:0] step(input logic [11:0] s);
    int ph = int'(s[2:0]);
    case (ph)
      0: return req_in ? t(0, 7'b0000000, 1) : t(0, 7'b0000000, 0);
      1: if (sup) return (rwe.w && match) ? t(0, 7'b0100000, 5) : t(0, 7'b0000011, 0);
         else     return t(2, 7'b1011100, 2);
      2: if (fdone) return t(1, 7'b0001100, 3);
      3: if (fdone) return sec_ok ? t(0, 7'b0000100, 4) : t(0, 7'b0000010, 0);
      4: return t(0, 7'b0010111, 0);
      5: return t(0, 7'b0000011, 0);
      default: ;
    endcase
    // hold, with the fetch request dropped
    return {s[11:7], 1'b0, s[5:0]};
  endfunction

  assign got = {mux_c, tmp_c, tbl_c, l_c, r_req, xlat, done, ack, phase};

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_in = 0; sup = 0; rwe = '0; match = 0; sec_ok = 0; fdone = 0;
    foreach (n_phase[k]) n_phase[k] = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (got !== '0) begin failures++; $display("FAIL reset state %h", got); end
    rst_n = 1;
    m = '0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      req_in = ($urandom % 2) == 0;
      sup    = ($urandom % 2) == 0;
      rwe    = rwe_t'(3'b001 << ($urandom % 3));
      match  = ($urandom % 2) == 0;
      sec_ok = ($urandom % 2) == 0;
      fdone  = ($urandom % 3) == 0;
      n_phase[m[2:0]]++;
      if (m[2:0] == 3'd1 && sup && rwe.w && match) n_tpw++;
      if (m[2:0] == 3'd1 && sup && !(rwe.w && match)) n_pass++;
      if (m[2:0] == 3'd3 && fdone && sec_ok) n_grant++;
      if (m[2:0] == 3'd3 && fdone && !sec_ok) n_fail++;
      if ((m[2:0] == 3'd2 || m[2:0] == 3'd3) && !fdone) n_wait++;
      m = step(m);
      @(posedge clk); #1;
      checks++;
      if (got !== m) begin
        failures++;
        $display("FAIL cycle %0d: got %b expected %b", k, got, m);
      end
    end
    for (int p = 0; p < 6; p++) begin
      checks++;
      if (n_phase[p] == 0) begin failures++; $display("FAIL phase %0d never reached", p); end
    end
    checks++;
    if (n_tpw == 0 || n_pass == 0 || n_grant == 0 || n_fail == 0 || n_wait == 0) begin
      failures++;
      $display("FAIL coverage tpw=%0d pass=%0d grant=%0d fail=%0d wait=%0d",
               n_tpw, n_pass, n_grant, n_fail, n_wait);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
