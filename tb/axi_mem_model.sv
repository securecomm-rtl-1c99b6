// axi_mem_model: behavioural AXI4 slave standing in for the DDR shared
// memory (not synthesizable). Storage is a sparse array of 128-bit words
// indexed by byte address / 16. Read bursts are queued and answered in
// order; ready and valid signals stall at random (STALL_PCT percent) to
// exercise the master's handshakes. Test code reads and writes the storage
// directly through peek/poke, which is also how tampering by an attacker is
// modelled. Only INCR bursts of 16-byte beats are supported.
module axi_mem_model #(
  parameter int unsigned ADDR_W    = 40,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [7:0]        arlen,
  input  logic [2:0]        arsize,
  input  logic [1:0]        arburst,
  input  logic              arvalid,
  output logic              arready,
  output logic [127:0]      rdata,
  output logic [1:0]        rresp,
  output logic              rlast,
  output logic              rvalid,
  input  logic              rready,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic [7:0]        awlen,
  input  logic [2:0]        awsize,
  input  logic [1:0]        awburst,
  input  logic              awvalid,
  output logic              awready,
  input  logic [127:0]      wdata,
  input  logic [15:0]       wstrb,
  input  logic              wlast,
  input  logic              wvalid,
  output logic              wready,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready
);
  logic [127:0] mem [longint];
  longint ar_addr_q [$];
  int     ar_len_q [$];
  longint w_addr;
  int     w_left;
  bit     w_busy = 0;
  int     b_pending = 0;
  int     r_beat = 0;
  int     bursts_4k_violations = 0;
  int     wlast_errors = 0;

  function automatic logic [127:0] peek(input longint byte_addr);
    return mem.exists(byte_addr >> 4) ? mem[byte_addr >> 4] : '0;
  endfunction
  function automatic void poke(input longint byte_addr, input logic [127:0] d);
    mem[byte_addr >> 4] = d;
  endfunction

  function automatic bit stall();
    return ($urandom % 100) < STALL_PCT;
  endfunction

  assign rresp = 2'b00;
  assign bresp = 2'b00;

  always @(posedge clk) begin
    if (!rst_n) begin
      arready <= 0; rvalid <= 0; awready <= 0; wready <= 0; bvalid <= 0;
      ar_addr_q.delete(); ar_len_q.delete(); w_busy = 0; b_pending = 0; r_beat = 0;
    end else begin
      // AR
      if (arvalid && arready) begin
        if ((longint'(araddr) & 4095) + (longint'(arlen) + 1) * 16 > 4096) bursts_4k_violations++;
        ar_addr_q.push_back(longint'(araddr));
        ar_len_q.push_back(int'(arlen) + 1);
      end
      arready <= !stall();
      // R
      if (rvalid && rready) r_beat++;
      if (ar_len_q.size() > 0 && r_beat == ar_len_q[0]) begin
        void'(ar_addr_q.pop_front());
        void'(ar_len_q.pop_front());
        r_beat = 0;
      end
      if (!rvalid || rready) begin
        if (ar_len_q.size() > 0 && !stall()) begin
          rvalid <= 1;
          rdata  <= peek(ar_addr_q[0] + 16 * r_beat);
          rlast  <= r_beat == ar_len_q[0] - 1;
        end else begin
          rvalid <= 0;
        end
      end
      // AW / W
      if (awvalid && awready) begin
        if ((longint'(awaddr) & 4095) + (longint'(awlen) + 1) * 16 > 4096) bursts_4k_violations++;
        w_addr = longint'(awaddr); w_left = int'(awlen) + 1; w_busy = 1;
      end
      if (wvalid && wready) begin
        poke(w_addr, wdata);
        w_addr += 16; w_left--;
        if (wlast != (w_left == 0)) wlast_errors++;
        if (w_left == 0) begin w_busy = 0; b_pending++; end
      end
      awready <= !w_busy && !(awvalid && awready) && !stall();
      wready  <= w_busy && !stall();
      // B
      if (bvalid && bready) bvalid <= 0;
      else if (!bvalid && b_pending > 0) begin bvalid <= 1; b_pending--; end
    end
  end
endmodule
