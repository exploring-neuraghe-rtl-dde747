// tb_tcdm_xbar: a 4-master crossbar on port A and a 2-master interconnect
// on port B of a 32-bank TCDM, all masters issuing random reads and writes.
// Every read must return the model's value one cycle after its grant, bank
// conflicts must occur and be resolved, and no master may wait more than
// NM cycles (round-robin fairness). Port A masters use words 0..255,
// port B masters words 256..383, so both ports are busy at once.
module tb_tcdm_xbar;
  import neuraghe_pkg::*;
  localparam int NA = 4, NBM = 2, NB = 32, DEPTH = 2048;
  localparam int RW = TCDM_AW - 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tcdm_req_t [NA-1:0]  a_m_req;
  tcdm_rsp_t [NA-1:0]  a_m_rsp;
  tcdm_req_t [NBM-1:0] b_m_req;
  tcdm_rsp_t [NBM-1:0] b_m_rsp;
  logic [NB-1:0] a_req, a_we, b_req, b_we;
  logic [NB-1:0][RW-1:0] a_addr_w, b_addr_w;
  logic [NB-1:0][WORD_W-1:0] a_wdata, a_rdata, b_wdata, b_rdata;

  tcdm_xbar #(.NM(NA), .NB(NB)) u_xa (.clk, .rst_n, .m_req(a_m_req), .m_rsp(a_m_rsp),
    .b_req(a_req), .b_we(a_we), .b_addr(a_addr_w), .b_wdata(a_wdata), .b_rdata(a_rdata));
  tcdm_xbar #(.NM(NBM), .NB(NB)) u_xb (.clk, .rst_n, .m_req(b_m_req), .m_rsp(b_m_rsp),
    .b_req(b_req), .b_we(b_we), .b_addr(b_addr_w), .b_wdata(b_wdata), .b_rdata(b_rdata));
  tcdm #(.NB(NB), .DEPTH(DEPTH)) u_mem (.clk,
    .a_req, .a_we, .a_addr(a_addr_w), .a_wdata, .a_rdata,
    .b_req, .b_we, .b_addr(b_addr_w), .b_wdata, .b_rdata);

  int checks = 0, failures = 0, conflicts = 0;
  logic [31:0] model [512];
  logic        known [512];
  tcdm_req_t [NA+NBM-1:0] rq;
  tcdm_rsp_t [NA+NBM-1:0] rs;
  logic [31:0] exp_d [NA+NBM];
  logic        exp_v [NA+NBM];
  logic        exp_k [NA+NBM];
  int          wait_c [NA+NBM];

  assign a_m_req = rq[NA-1:0];
  assign b_m_req = rq[NA+NBM-1:NA];
  assign rs = {b_m_rsp, a_m_rsp};

  // new random request for master m
  function automatic tcdm_req_t rnd(int m);
    tcdm_req_t r;
    r.req   = ($urandom_range(0, 3) != 0);
    r.we    = $urandom_range(0, 1);
    r.addr  = TCDM_AW'((m < NA) ? $urandom_range(0, 255) : $urandom_range(256, 383));
    if ($urandom_range(0, 2) == 0) r.addr = TCDM_AW'((m < NA) ? 7 : 263);  // force conflicts
    r.wdata = $urandom;
    return r;
  endfunction

  initial begin
    foreach (known[i]) known[i] = 0;
    foreach (exp_v[i]) begin exp_v[i] = 0; wait_c[i] = 0; end
    for (int m = 0; m < NA+NBM; m++) rq[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < NA+NBM; m++) rq[m] = rnd(m);
    for (int cyc = 0; cyc < 3000; cyc++) begin
      #1;
      // check read data of last cycle's grants
      for (int m = 0; m < NA+NBM; m++) begin
        if (exp_v[m]) begin
          checks++;
          if (!rs[m].rvalid || (exp_k[m] && rs[m].rdata != exp_d[m])) begin
            failures++;
            if (failures < 5) $display("FAIL m%0d read %h vs %h", m, rs[m].rdata, exp_d[m]);
          end
        end else if (rs[m].rvalid) failures++;
        exp_v[m] = 0;
      end
      // grants of this cycle (reads see memory before this cycle's writes)
      for (int m = 0; m < NA+NBM; m++)
        if (rq[m].req && rs[m].gnt && !rq[m].we) begin
          exp_v[m] = 1;
          exp_k[m] = known[rq[m].addr];
          exp_d[m] = model[rq[m].addr];
        end
      for (int m = 0; m < NA+NBM; m++) begin
        if (rq[m].req && rs[m].gnt && rq[m].we) begin
          model[rq[m].addr] = rq[m].wdata;
          known[rq[m].addr] = 1;
        end
        if (rq[m].req && !rs[m].gnt) begin
          conflicts++;
          wait_c[m]++;
          checks++;
          if (wait_c[m] > ((m < NA) ? NA : NBM)) begin
            failures++;
            $display("FAIL m%0d starved", m);
          end
        end else wait_c[m] = 0;
      end
      @(posedge clk);
      @(negedge clk);
      for (int m = 0; m < NA+NBM; m++)
        if (!rq[m].req || rs[m].gnt || $isunknown(rq[m].req)) rq[m] = rnd(m);
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no conflicts"); end
    $display("conflicts=%0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
