// tb_handle_mem: simulation-only memory behind NH memory handles. Each handle
// gets done one to three cycles after it raises r_en, w_en or flush (the
// delay is random), with read data from a shared sparse word array that
// testbenches fill and inspect directly. It also flags any access outside
// the handle's region.
// Interface: the memory handle request/response structs of ml_pkg. Not a
// block of the source design; a test helper of this design.
module tb_handle_mem
  import ml_pkg::*;
#(
  parameter int NH = 3
) (
  input  logic    clk,
  input  mh_req_t req [NH],
  output mh_rsp_t rsp [NH]
);
  word_t mem [int];
  int    wait_c [NH];
  int    n_oob;
  int    n_acc;

  initial begin
    n_oob = 0; n_acc = 0;
    for (int h = 0; h < NH; h++) begin wait_c[h] = -1; rsp[h] = '0; end
  end

  always @(posedge clk) begin
    for (int h = 0; h < NH; h++) begin
      rsp[h].done <= 1'b0;
      rsp[h].avail <= 1'b1;
      if ((req[h].r_en || req[h].w_en || req[h].flush) && !rsp[h].done) begin
        if (wait_c[h] < 0) wait_c[h] = int'($urandom_range(2));
        else if (wait_c[h] == 0) begin
          wait_c[h] = -1;
          rsp[h].done <= 1'b1;
          if (req[h].r_en || req[h].w_en) begin
            n_acc++;
            if (req[h].ptr < req[h].region_begin || req[h].ptr >= req[h].region_end) n_oob++;
          end
          if (req[h].r_en) rsp[h].data_load <= mem.exists(int'(req[h].ptr)) ? mem[int'(req[h].ptr)] : '0;
          if (req[h].w_en) mem[int'(req[h].ptr)] = req[h].data_store;
        end else wait_c[h]--;
      end
    end
  end
endmodule
