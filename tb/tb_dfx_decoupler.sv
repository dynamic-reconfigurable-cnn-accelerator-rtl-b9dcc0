// tb_dfx_decoupler: self-checking test of the decoupler.  With random values
// on every input it checks that all signals pass unchanged while `decouple`
// is low and that every signal crossing the boundary, in both directions, is
// zero while it is high.
module tb_dfx_decoupler;
  import cnn_pkg::*;

  logic decouple, decouple_status;
  logic st_busy, st_done, rp_busy, rp_done;
  axil_req_t st_axil_req, rp_axil_req;
  axil_rsp_t st_axil_rsp, rp_axil_rsp;
  data_t st_in_tdata, st_out_tdata, rp_in_tdata, rp_out_tdata;
  logic st_in_tvalid, st_in_tlast, st_in_tready, st_out_tvalid, st_out_tlast, st_out_tready;
  logic rp_in_tvalid, rp_in_tlast, rp_in_tready, rp_out_tvalid, rp_out_tlast, rp_out_tready;

  dfx_decoupler dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      decouple      = (t % 3 == 0);
      st_axil_req   = axil_req_t'({$urandom, $urandom});
      rp_axil_rsp   = axil_rsp_t'({$urandom, $urandom});
      st_in_tdata   = data_t'($urandom);
      st_in_tvalid  = 1'($urandom_range(1));
      st_in_tlast   = 1'($urandom_range(1));
      st_out_tready = 1'($urandom_range(1));
      rp_busy       = 1'($urandom_range(1));
      rp_done       = 1'($urandom_range(1));
      rp_in_tready  = 1'($urandom_range(1));
      rp_out_tdata  = data_t'($urandom);
      rp_out_tvalid = 1'($urandom_range(1));
      rp_out_tlast  = 1'($urandom_range(1));
      #1;
      check(decouple_status == decouple, "status");
      if (!decouple) begin
        check(rp_axil_req == st_axil_req && rp_in_tdata == st_in_tdata && rp_in_tvalid == st_in_tvalid &&
              rp_in_tlast == st_in_tlast && rp_out_tready == st_out_tready, "into partition, coupled");
        check(st_axil_rsp == rp_axil_rsp && st_busy == rp_busy && st_done == rp_done && st_in_tready == rp_in_tready &&
              st_out_tdata == rp_out_tdata && st_out_tvalid == rp_out_tvalid &&
              st_out_tlast == rp_out_tlast, "out of partition, coupled");
      end else begin
        check(rp_axil_req == '0 && rp_in_tdata == 0 && !rp_in_tvalid && !rp_in_tlast && !rp_out_tready,
              "into partition, decoupled");
        check(st_axil_rsp == '0 && !st_busy && !st_done && !st_in_tready && st_out_tdata == 0 && !st_out_tvalid &&
              !st_out_tlast, "out of partition, decoupled");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
