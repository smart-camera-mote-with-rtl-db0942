// dpram: dual-port RAM between the IC3D (port A) and the 8051 host (port B).
//
// 2**AW words of DW bits (128K x 8 by default) in two banks of 64K words. The
// two processors use it as a shared workspace at their own pace: the vision
// processor writes results (feature points, object coordinates, image parts),
// the host reads them and can write data back.
//
// Address spaces. With *_sem low a port addresses the data array; port A
// gives the full AW-bit address, port B a 16-bit address plus a bank-select
// pin (the 8051 has a 16-bit external bus). With *_sem high a port addresses
// the control space:
//   0 .. NSEM-1  semaphores. Write bit0 = 0 to request, 1 to release; a read
//                returns bit0 = 0 if this port owns the semaphore, 1 if not.
//                When both ports request a free semaphore in the same cycle,
//                port A gets it.
//   8, 9         bank allocation of bank 0 / 1: 0 shared, 1 IC3D only,
//                2 host only. Readable by both, writable by the host only.
// A data access to a bank allocated to the other side is refused: a write is
// dropped, a read returns 0, and *_denied is reported. When both ports write
// the same word in the same cycle, port A's write wins and port B's busy flag
// is raised, so the host knows to retry.
//
// Timing: requests are taken on the clock edge with *_en high; rdata, busy
// and denied are valid one clock later. Capacity and bank split follow the
// camera platform; semaphores and bank allocation are described there only by
// function, so the register map and protocol are this design's own.
module dpram #(
  parameter int unsigned AW   = 17,
  parameter int unsigned DW   = 8,
  parameter int unsigned NSEM = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // port A: IC3D
  input  logic          a_en,
  input  logic          a_we,
  input  logic          a_sem,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  output logic          a_denied,
  // port B: host
  input  logic          b_en,
  input  logic          b_we,
  input  logic          b_sem,
  input  logic          b_bank,
  input  logic [AW-2:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata,
  output logic          b_busy,
  output logic          b_denied
);

  typedef enum logic [1:0] {OWN_FREE = 2'd0, OWN_A = 2'd1, OWN_B = 2'd2} owner_e;
  typedef enum logic [1:0] {AL_SHARED = 2'd0, AL_IC3D = 2'd1, AL_HOST = 2'd2} alloc_e;

  logic [DW-1:0] mem [2**AW];
  owner_e        sem_own [NSEM];
  alloc_e        alloc [2];

  logic [AW-1:0] b_full;
  logic          a_ok, b_ok, a_wr, b_wr, collide;
  logic [3:0]    a_ca, b_ca;

  assign b_full  = {b_bank, b_addr};
  assign a_ok    = (alloc[a_addr[AW-1]] != AL_HOST);
  assign b_ok    = (alloc[b_bank] != AL_IC3D);
  assign a_wr    = a_en && !a_sem && a_we && a_ok;
  assign b_wr    = b_en && !b_sem && b_we && b_ok;
  assign collide = a_wr && b_wr && (a_addr == b_full);
  assign a_ca    = a_addr[3:0];
  assign b_ca    = b_addr[3:0];

  // data array
  always_ff @(posedge clk) begin
    if (b_wr && !collide) mem[b_full] <= b_wdata;
    if (a_wr)             mem[a_addr] <= a_wdata;
  end

  function automatic logic [DW-1:0] ctrl_read(input logic [3:0] ca, input owner_e me);
    logic [DW-1:0] v;
    v = '0;
    if (32'(ca) < NSEM)  v[0] = (sem_own[ca[$clog2(NSEM)-1:0]] != me);
    else if (ca == 4'd8) v[1:0] = alloc[0];
    else if (ca == 4'd9) v[1:0] = alloc[1];
    return v;
  endfunction

  // read data and status
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_rdata  <= '0;
      b_rdata  <= '0;
      a_denied <= 1'b0;
      b_denied <= 1'b0;
      b_busy   <= 1'b0;
    end else begin
      a_denied <= a_en && !a_sem && !a_ok;
      b_denied <= b_en && !b_sem && !b_ok;
      b_busy   <= collide;
      if (a_en && !a_we) a_rdata <= a_sem ? ctrl_read(a_ca, OWN_A) : (a_ok ? mem[a_addr] : '0);
      if (b_en && !b_we) b_rdata <= b_sem ? ctrl_read(b_ca, OWN_B) : (b_ok ? mem[b_full] : '0);
    end
  end

  // semaphores and bank allocation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSEM; i++) sem_own[i] <= OWN_FREE;
      alloc[0] <= AL_SHARED;
      alloc[1] <= AL_SHARED;
    end else begin
      for (int i = 0; i < NSEM; i++) begin
        logic a_hit, b_hit;
        a_hit = a_en && a_sem && a_we && a_ca == 4'(i);
        b_hit = b_en && b_sem && b_we && b_ca == 4'(i);
        if (sem_own[i] == OWN_FREE) begin
          if (a_hit && !a_wdata[0])      sem_own[i] <= OWN_A;
          else if (b_hit && !b_wdata[0]) sem_own[i] <= OWN_B;
        end else if (sem_own[i] == OWN_A) begin
          if (a_hit && a_wdata[0])       sem_own[i] <= OWN_FREE;
        end else if (sem_own[i] == OWN_B) begin
          if (b_hit && b_wdata[0])       sem_own[i] <= OWN_FREE;
        end
      end
      if (b_en && b_sem && b_we && b_ca == 4'd8) alloc[0] <= alloc_e'(b_wdata[1:0]);
      if (b_en && b_sem && b_we && b_ca == 4'd9) alloc[1] <= alloc_e'(b_wdata[1:0]);
    end
  end

endmodule
