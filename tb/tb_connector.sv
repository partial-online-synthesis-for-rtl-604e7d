// tb_connector: self-checking test of one CGRI connector.
// Every cycle a random configuration field, random link words from both
// sides and random SI operands are applied. The expected link words,
// operand selection, route error and result-path word are derived from a
// reference copy of the local memory kept by the testbench; the reference
// memory is updated with the write the configuration asks for.
module tb_connector;
  import cgri_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  conn_cfg_t           cfg;
  word_t               from_left   [N_LINKS];
  word_t               from_right  [N_LINKS];
  logic  [N_LINKS-1:0] valid_left, valid_right;
  logic  [N_LINKS-1:0] drive, cut;
  word_t               link_data   [N_LINKS];
  word_t               opnd        [2];
  logic                fgra_start;
  word_t               fgra_opnd   [N_IN];
  word_t               fgra_result;
  logic [MEM_AW-1:0]   res_addr;
  word_t               res_data;
  logic                route_err;

  word_t ref_mem [MEM_WORDS];
  int checks = 0, failures = 0;
  int n_src [4];
  int n_wr  [4];

  connector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t mismatch: %s", $time, what);
    end
  endtask

  initial begin
    cfg = '0; res_addr = '0; fgra_result = '0; opnd = '{default: '0};
    from_left = '{default: '0}; from_right = '{default: '0};
    valid_left = '0; valid_right = '0;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    foreach (n_src[i]) begin n_src[i] = 0; n_wr[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      automatic word_t exp_wdata;
      automatic bit exp_we;
      automatic bit exp_err;
      @(negedge clk);
      cfg         = conn_cfg_t'({$urandom, $urandom});
      res_addr    = MEM_AW'($urandom_range(0, MEM_WORDS - 1));
      fgra_result = $urandom;
      opnd[0]     = $urandom;
      opnd[1]     = $urandom;
      valid_left  = N_LINKS'($urandom);
      valid_right = N_LINKS'($urandom);
      foreach (from_left[s])  from_left[s]  = $urandom;
      foreach (from_right[s]) from_right[s] = $urandom;
      #1;
      exp_err = 1'b0;
      for (int s = 0; s < int'(N_LINKS); s++) begin
        check(drive[s] == cfg.lnk[s].drive, "drive");
        check(cut[s] == cfg.lnk[s].cut, "cut");
        check(link_data[s] == ref_mem[cfg.lnk[s].rd_addr], "link data");
      end
      for (int i = 0; i < int'(N_IN); i++) begin
        automatic word_t e;
        automatic int l = int'(cfg.in_sel[i].link);
        n_src[int'(cfg.in_sel[i].src)]++;
        if (l >= int'(N_LINKS) && cfg.in_sel[i].src != IN_NONE) begin
          e = '0;
          exp_err = 1'b1;
        end else
        case (cfg.in_sel[i].src)
          IN_LEFT:  begin e = from_left[l];  if (!valid_left[l])  exp_err = 1'b1; end
          IN_RIGHT: begin e = from_right[l]; if (!valid_right[l]) exp_err = 1'b1; end
          IN_LOCAL: e = ref_mem[cfg.lnk[l].rd_addr];
          default:  e = '0;
        endcase
        check(fgra_opnd[i] == e, "fgra operand");
      end
      check(route_err == exp_err, "route_err");
      check(fgra_start == cfg.start, "start");
      check(res_data == ref_mem[res_addr], "result read");
      n_wr[int'(cfg.wr_src)]++;
      exp_we = 1'b1;
      case (cfg.wr_src)
        WR_FGRA:  exp_wdata = fgra_result;
        WR_OPND0: exp_wdata = opnd[0];
        WR_OPND1: exp_wdata = opnd[1];
        default: begin exp_we = 1'b0; exp_wdata = '0; end
      endcase
      @(posedge clk);
      if (exp_we) ref_mem[cfg.wr_addr] = exp_wdata;
    end
    foreach (n_src[i]) check(n_src[i] > 0, "operand source coverage");
    foreach (n_wr[i])  check(n_wr[i] > 0, "write source coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
