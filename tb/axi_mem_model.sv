// axi_mem_model: behavioural AXI3 write-only memory for testbenches.
// N independent write ports share one memory of 64-bit words (an
// associative array indexed by byte address / 8).  Each port takes one
// address, then its data beats, then answers with an OKAY response, with
// random wait states on every channel.  It counts protocol errors: wlast
// on the wrong beat, a burst crossing a 4 KB boundary, a beat size other
// than 8 bytes, a non-INCR burst.  Not synthesizable.
module axi_mem_model
  import dla_pkg::*;
#(
  parameter int N = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axi_wr_req_t axi_req [N],
  output axi_wr_rsp_t axi_rsp [N]
);
  logic [63:0] mem [logic [31:0]];
  int proto_err = 0;
  int bursts = 0;
  int beats_total = 0;
  int st [N];
  logic [31:0] addr [N];
  int left [N];

  // word at a byte address, 0 if never written
  function automatic logic [63:0] peek(logic [31:0] a);
    return mem.exists(a >> 3) ? mem[a >> 3] : 64'd0;
  endfunction

  initial for (int p = 0; p < N; p++) begin st[p] = 0; axi_rsp[p] = '0; end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) begin st[p] = 0; axi_rsp[p] <= '0; end
    end else begin
      for (int p = 0; p < N; p++) begin
        case (st[p])
          0: if (axi_req[p].awvalid && axi_rsp[p].awready) begin
               addr[p] = axi_req[p].awaddr;
               left[p] = int'(axi_req[p].awlen) + 1;
               if (axi_req[p].awsize != 3'd3 || axi_req[p].awburst != 2'b01) proto_err++;
               if ((axi_req[p].awaddr & 32'hFFF) + 32'(left[p] * 8) > 32'h1000) proto_err++;
               bursts++;
               st[p] = 1;
             end
          1: if (axi_req[p].wvalid && axi_rsp[p].wready) begin
               mem[addr[p] >> 3] = axi_req[p].wdata;
               addr[p] += 8;
               left[p]--;
               beats_total++;
               if (axi_req[p].wlast != (left[p] == 0)) proto_err++;
               if (left[p] == 0) st[p] = 2;
             end
          2: if (axi_rsp[p].bvalid && axi_req[p].bready) st[p] = 0;
          default: ;
        endcase
        axi_rsp[p].awready <= st[p] == 0 && $urandom_range(0, 2) == 0;
        axi_rsp[p].wready  <= st[p] == 1 && $urandom_range(0, 3) != 0;
        axi_rsp[p].bvalid  <= st[p] == 2 && $urandom_range(0, 1) == 0;
        axi_rsp[p].bid     <= axi_req[p].awid;
        axi_rsp[p].bresp   <= 2'b00;
      end
    end
  end
endmodule
