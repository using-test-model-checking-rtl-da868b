// tmc_pkg: types and constants shared by the memory systems under test and by the
// test automata that exercise them.
//
// The test automata work on two shared locations, A and B, and on data that has been
// abstracted to a single bit (a value is only ever compared against a threshold, so
// "at or below alpha" is 0 and "above alpha" is 1). Hence the one-bit address and data
// defaults. Every processor talks to its memory system through the same blocking port:
// it holds mem_req_t (valid, we, addr, wdata) until the memory answers with a one-cycle
// mem_rsp_t.done, which carries the read data for a read. The Runway types name the bus
// transactions (rsp, rp, c2cw, hdr), the cache coherency responses (ccr) and the four
// stable cache line states of the snoopy protocol.
package tmc_pkg;

  parameter int unsigned AW = 1;        // two locations: A = 0, B = 1
  parameter int unsigned DW = 1;        // data abstracted to 0 / 1
  parameter int unsigned NADDR = 1 << AW;
  parameter int unsigned ID_W = 3;      // up to four clients plus HOST on Runway

  typedef logic [AW-1:0] addr_t;
  typedef logic [DW-1:0] data_t;
  typedef logic [ID_W-1:0] id_t;

  localparam addr_t ADDR_A = addr_t'(0);
  localparam addr_t ADDR_B = addr_t'(1);

  // Blocking processor-to-memory port.
  typedef struct packed {
    logic  valid;
    logic  we;
    addr_t addr;
    data_t wdata;
  } mem_req_t;

  typedef struct packed {
    logic  done;
    data_t rdata;
  } mem_rsp_t;

  // Runway transactions modelled here.
  typedef enum logic [1:0] {
    TX_RSP  = 2'd0,   // read shared or private (read miss)
    TX_RP   = 2'd1,   // read private (write miss)
    TX_C2CW = 2'd2,   // cache to cache write (data from a client)
    TX_HDR  = 2'd3    // host data return (data from memory)
  } rw_txn_e;

  // Cache coherency responses sent by each client to HOST.
  typedef enum logic [1:0] {
    CCR_OK      = 2'd0,
    CCR_SHARED  = 2'd1,
    CCR_COPYOUT = 2'd2
  } ccr_e;

  // Stable cache line states.
  typedef enum logic [1:0] {
    LS_INVALID    = 2'd0,
    LS_SHARED     = 2'd1,
    LS_PRIV_CLEAN = 2'd2,
    LS_DIRTY      = 2'd3
  } line_state_e;

  // One Runway bus cycle. dst and data are used by data returns (c2cw, hdr);
  // shared is the Client_op indication that travels with an hdr.
  typedef struct packed {
    logic    valid;
    rw_txn_e kind;
    id_t     src;
    id_t     dst;
    addr_t   addr;
    data_t   data;
    logic    shared;
  } rw_bus_t;

  // A snooped coherent transaction, as held in the CCC queues and in HOST's order queue.
  typedef struct packed {
    rw_txn_e kind;
    id_t     src;
    addr_t   addr;
  } coh_txn_t;

  // Internal events of lazy caching (memory write, memory read, cache update,
  // cache invalidate). Which one happens next is left open by the protocol.
  typedef enum logic [1:0] {
    EV_MW = 2'd0,
    EV_MR = 2'd1,
    EV_CU = 2'd2,
    EV_CI = 2'd3
  } lc_event_e;

  // Which test of the ARCHTEST suite the harness runs.
  typedef enum logic [1:0] {
    MODE_ROWO = 2'd0,   // Test_ROWO, compound rule A(CMP, RO, WO)
    MODE_WA   = 2'd1,   // Test_WA,   compound rule A(CMP, RO, WO, WA)
    MODE_PO   = 2'd2    // Test_PO,   compound rule A(CMP, PO)
  } test_mode_e;

endpackage
